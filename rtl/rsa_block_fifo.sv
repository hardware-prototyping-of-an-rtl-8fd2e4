// rsa_block_fifo: small first-in first-out store for message or result blocks.
//
// Each entry is W+3 bits: a 3-bit key-size code above a W-bit block. Entries
// live in a register array addressed by a write and a read pointer; a counter
// gives the fill level. The head entry is presented on rd_data whenever the
// FIFO is not empty. push and pop may be given in the same cycle; a push into
// a full FIFO and a pop from an empty one are ignored. One clock per
// operation, synchronous active-high reset. DEPTH must be a power of two.
//
// Both block buffers of the engine use this store; its organisation is this
// design's choice.
module rsa_block_fifo #(
  parameter int unsigned W     = 1024,  // block width
  parameter int unsigned DEPTH = 2      // entries
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [W+2:0]               wr_data,
  input  logic                       pop,
  output logic [W+2:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W+2:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wptr] <= wr_data;
        wptr      <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      end
      if (do_pop) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule

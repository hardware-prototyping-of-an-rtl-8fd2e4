// rsa_preprocess: serial-to-parallel converter for incoming message blocks.
//
// A one-cycle start pulse begins a block: the bit on data_in in that same
// cycle is bit 0, and one further bit is taken on each following clock,
// least significant first, until key_bits(size) bits have been collected
// (size is sampled with start). The bits are written straight into their
// position of data_out, which is cleared at start, so a block shorter than W
// comes out right-aligned with zeros above it. valid rises in the cycle after
// the last bit and stays high, with data_out and size_out stable, until the
// next start. A start during a conversion restarts it. Synchronous active-high
// reset.
//
// Interface and behaviour follow the published converter (DataIn, DataOut,
// Start, Valid); the bit order and the exact cycle of each bit are this
// design's choices.
module rsa_preprocess
  import rsa_pkg::*;
#(
  parameter int unsigned W = MAX_BITS
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  key_size_e     size,
  input  logic          data_in,
  output logic [W-1:0]  data_out,
  output key_size_e     size_out,
  output logic          valid
);

  localparam int unsigned CW = $clog2(W);

  logic          busy;
  logic [CW-1:0] idx;     // position of the next bit
  logic [CW-1:0] last;    // position of the final bit of this block

  function automatic logic [CW-1:0] last_index(input key_size_e s);
    int unsigned b;
    b = key_bits(s);
    if (b > W) b = W;
    return CW'(b - 1);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      valid    <= 1'b0;
      idx      <= '0;
      last     <= '0;
      data_out <= '0;
      size_out <= KEY_32;
    end else if (start) begin
      data_out    <= W'(data_in);
      size_out    <= size;
      last        <= last_index(size);
      idx         <= CW'(1);
      valid       <= 1'b0;
      busy        <= (last_index(size) != '0);
    end else if (busy) begin
      data_out[idx] <= data_in;
      idx           <= idx + 1'b1;
      if (idx == last) begin
        busy  <= 1'b0;
        valid <= 1'b1;
      end
    end
  end

endmodule

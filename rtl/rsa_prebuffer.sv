// rsa_prebuffer: input buffer between the serial-to-parallel converter and
// the RSA core.
//
// A message block is stored when in_valid (the converter's Valid level) rises.
// While a block is waiting and the core may start (core_ready), go is raised
// with the oldest block on m and m_size; the core samples them on that clock
// edge and the block leaves the buffer at the same edge. go is combinational
// from core_ready and the fill level, so a block waiting for an idle core
// starts in the first cycle the core is ready. Up to DEPTH blocks are held; a
// block arriving while the buffer is full is dropped and sets the sticky
// overflow flag until reset.
//
// Holding blocks until the core signals it is ready follows the published
// design; the depth, the overflow flag and the edge-triggered capture are this
// design's choices.
module rsa_prebuffer
  import rsa_pkg::*;
#(
  parameter int unsigned W     = MAX_BITS,
  parameter int unsigned DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  input  key_size_e     in_size,
  input  logic          core_ready,
  output logic          go,
  output logic [W-1:0]  m,
  output key_size_e     m_size,
  output logic          full,
  output logic          overflow
);

  logic         valid_q, push, empty;
  logic [W+2:0] head;

  assign push = in_valid && !valid_q;
  assign go   = core_ready && !empty;

  rsa_block_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst     (rst),
    .push    (push),
    .wr_data ({in_size, in_data}),
    .pop     (go),
    .rd_data (head),
    .empty   (empty),
    .full    (full),
    .count   ()
  );

  assign m      = head[W-1:0];
  assign m_size = key_size_e'(head[W+2:W]);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      valid_q <= in_valid;
      if (push && full) overflow <= 1'b1;
    end
  end

endmodule

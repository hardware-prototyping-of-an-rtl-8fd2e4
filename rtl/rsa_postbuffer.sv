// rsa_postbuffer: output buffer between the RSA core and the
// parallel-to-serial converter.
//
// A result is stored when in_done (the core's DONE level) rises. While a
// result is waiting and the converter is not shifting (out_busy low),
// out_start is raised for one cycle with the oldest result on out_data and
// out_size; it leaves the buffer at that clock edge. can_accept tells the
// block that starts the core whether one more result is sure to fit: it
// counts a result being stored in the current cycle, and since the buffer is
// only filled by the core, a result started while can_accept is high is never
// lost. Up to DEPTH results are held.
//
// Buffering results so that none is lost follows the published design; the
// depth and the can_accept look-ahead are this design's choices.
module rsa_postbuffer
  import rsa_pkg::*;
#(
  parameter int unsigned W     = MAX_BITS,
  parameter int unsigned DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_done,
  input  logic [W-1:0]  in_data,
  input  key_size_e     in_size,
  input  logic          out_busy,
  output logic          out_start,
  output logic [W-1:0]  out_data,
  output key_size_e     out_size,
  output logic          can_accept
);

  logic         done_q, push, empty, full;
  logic [W+2:0] head;
  logic [$clog2(DEPTH):0] count;

  assign push       = in_done && !done_q;
  assign out_start  = !out_busy && !empty;
  assign can_accept = (32'(count) + 32'(push)) < DEPTH;

  rsa_block_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst     (rst),
    .push    (push),
    .wr_data ({in_size, in_data}),
    .pop     (out_start),
    .rd_data (head),
    .empty   (empty),
    .full    (full),
    .count   (count)
  );

  assign out_data = head[W-1:0];
  assign out_size = key_size_e'(head[W+2:W]);

  always_ff @(posedge clk) begin
    if (rst) done_q <= 1'b0;
    else     done_q <= in_done;
  end

  // The core must never be able to finish into a full buffer.
  assert property (@(posedge clk) disable iff (rst) push |-> !full)
    else $error("rsa_postbuffer: result arrived while full");

endmodule

// rsa_postprocess: parallel-to-serial converter for result blocks.
//
// A one-cycle done pulse loads data_in and size. From the next cycle on, one
// bit per clock is driven on serial, least significant first, with busy high,
// for key_bits(size) cycles. In the cycle after the last bit, valid (the
// done_complete indication) rises and stays high until the next done pulse;
// serial is 0 whenever busy is low, so bits seen after valid rises are not
// part of the result. A done pulse while busy restarts the converter with the
// new block. Synchronous active-high reset.
//
// The Done-in / Valid-out behaviour follows the published converter; the bit
// order, the busy output and the cycle of each bit are this design's choices.
module rsa_postprocess
  import rsa_pkg::*;
#(
  parameter int unsigned W = MAX_BITS
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          done,
  input  logic [W-1:0]  data_in,
  input  key_size_e     size,
  output logic          serial,
  output logic          busy,
  output logic          valid
);

  localparam int unsigned CW = $clog2(W);

  logic [W-1:0]  data_r;
  logic [CW-1:0] idx;     // position of the bit on serial
  logic [CW-1:0] last;    // position of the final bit

  function automatic logic [CW-1:0] last_index(input key_size_e s);
    int unsigned b;
    b = key_bits(s);
    if (b > W) b = W;
    return CW'(b - 1);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      valid  <= 1'b0;
      idx    <= '0;
      last   <= '0;
      data_r <= '0;
    end else if (done) begin
      data_r <= data_in;
      last   <= last_index(size);
      idx    <= '0;
      busy   <= 1'b1;
      valid  <= 1'b0;
    end else if (busy) begin
      idx <= idx + 1'b1;
      if (idx == last) begin
        busy  <= 1'b0;
        valid <= 1'b1;
      end
    end
  end

  assign serial = busy & data_r[idx];

endmodule

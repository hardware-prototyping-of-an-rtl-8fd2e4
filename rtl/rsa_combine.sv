// rsa_combine: flexible-key RSA encryption engine, serial in and serial out.
//
// A message block arrives bit-serially and is turned into a parallel word by
// rsa_preprocess, waits in rsa_prebuffer until the core is free, is raised to
// the power E modulo N by rsa_core, waits in rsa_postbuffer until the output
// converter is free, and leaves bit-serially through rsa_postprocess:
//
//   data_in -> PREPROCESS -> PREBUFFER -> CORE -> POSTBUFFER -> POSTPROCESS -> serial
//
// Encryption and decryption are the same operation: apply the public
// exponent e on `e` to encrypt and the private exponent d to decrypt, with the
// modulus on `n`. Both must be held stable while blocks are being processed.
// Each block carries the key-size code given with its start pulse (32 to 1024
// bits), so blocks of different sizes may follow each other.
//
// Flow control: the core is started only when the output buffer will have
// room for its result (rsa_postbuffer.can_accept), so no result is lost. The
// input side has no such back-pressure: the sender must watch prebuf_full;
// a block completed while it is high is dropped and overflow is set.
//
// Timing: a block of b bits takes b cycles to shift in, the core's run time
// (see rsa_core), and b cycles to shift out, starting the cycle after the
// result leaves the output buffer; done_complete rises after the last bit.
//
// The five units and their order follow the published design; the key and
// modulus entering in parallel, the handshakes and the flow control are this
// design's choices.
module rsa_combine
  import rsa_pkg::*;
#(
  parameter int unsigned W     = MAX_BITS,  // widest key, bits
  parameter int unsigned DEPTH = 2          // blocks per buffer
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  key_size_e     size,
  input  logic          data_in,
  input  logic [W-1:0]  e,
  input  logic [W-1:0]  n,
  output logic          in_valid,
  output logic          prebuf_full,
  output logic          overflow,
  output logic          core_done,
  output logic          serial,
  output logic          serial_busy,
  output logic          done_complete
);

  logic [W-1:0] pre_data, core_m, core_c, post_data;
  key_size_e    pre_size, core_size, core_c_size, post_size;
  logic         core_go, core_ready, post_can_accept, post_start;

  rsa_preprocess #(.W(W)) u_pre (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .size     (size),
    .data_in  (data_in),
    .data_out (pre_data),
    .size_out (pre_size),
    .valid    (in_valid)
  );

  rsa_prebuffer #(.W(W), .DEPTH(DEPTH)) u_prebuf (
    .clk        (clk),
    .rst        (rst),
    .in_valid   (in_valid),
    .in_data    (pre_data),
    .in_size    (pre_size),
    .core_ready (core_ready && post_can_accept),
    .go         (core_go),
    .m          (core_m),
    .m_size     (core_size),
    .full       (prebuf_full),
    .overflow   (overflow)
  );

  rsa_core #(.W(W)) u_core (
    .clk    (clk),
    .rst    (rst),
    .go     (core_go),
    .m      (core_m),
    .e      (e),
    .n      (n),
    .size   (core_size),
    .c      (core_c),
    .c_size (core_c_size),
    .done   (core_done),
    .ready  (core_ready)
  );

  rsa_postbuffer #(.W(W), .DEPTH(DEPTH)) u_postbuf (
    .clk        (clk),
    .rst        (rst),
    .in_done    (core_done),
    .in_data    (core_c),
    .in_size    (core_c_size),
    .out_busy   (serial_busy),
    .out_start  (post_start),
    .out_data   (post_data),
    .out_size   (post_size),
    .can_accept (post_can_accept)
  );

  rsa_postprocess #(.W(W)) u_post (
    .clk     (clk),
    .rst     (rst),
    .done    (post_start),
    .data_in (post_data),
    .size    (post_size),
    .serial  (serial),
    .busy    (serial_busy),
    .valid   (done_complete)
  );

endmodule

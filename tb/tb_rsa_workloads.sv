// tb_rsa_workloads: run times of the RSA core at its default 1024-bit width
// for the operations the engine is rated on, at a 20 MHz clock (50 ns).
//
//   * 32-bit key: exponent 0x41 (encryption) and 0x13A0C2 (decryption) on the
//     message 0x2400C5F. The modulus these were used with is not known, so
//     the largest 32-bit prime, 0xFFFFFFFB, stands in; the result is checked
//     against a square-and-multiply reference.
//   * 256-bit and 1024-bit keys with the small worked example (n = 63, e = 5,
//     message 7, cipher 49).
//   * 1024-bit key with a full-size modulus (product of two 512-bit primes)
//     and e = 5; its run time is checked against the 790.61 us (15,812
//     cycle) rating for a 1024-bit encryption.
// Each run prints its cycle count and time; the checks are on the results and
// on the 1024-bit rating.
module tb_rsa_workloads;
  import rsa_pkg::*;

  localparam int unsigned W = MAX_BITS;
  localparam logic [W-1:0] N1024 = W'({
    256'hafa929d18c2806414661f52a1cbfa1cf2ea6bbb231f41cd5f0ca18396e5a7334,
    256'h57d8136b3fdd48bcc1c13409d281187294b27024763bca404e080f74b52e2879,
    256'haeacf1c6b26de6d82adcec1d41f2724375e7d13121dad0bef160862d71e9c918,
    256'hb236c4c24f43a75da2415b13e5e612c27d45f7b5b380f94380594e16deaa4737});

  logic clk = 1'b0;
  logic rst, go, done, ready;
  logic [W-1:0] m, e, n, c;
  key_size_e size, c_size;
  int checks = 0;
  int failures = 0;

  rsa_core dut (.*);

  always #25 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] mulmod(logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] nn);
    logic [2*W-1:0] pr;
    pr = (2*W)'(a) * (2*W)'(b);
    return W'(pr % (2*W)'(nn));
  endfunction

  function automatic logic [W-1:0] powmod(logic [W-1:0] mm, logic [W-1:0] ee, logic [W-1:0] nn);
    logic [W-1:0] r, b;
    r = 1;
    b = mm;
    for (int i = 0; i < W; i++) begin
      if (ee[i]) r = mulmod(r, b, nn);
      b = mulmod(b, b, nn);
    end
    return r;
  endfunction

  task automatic run(string what, logic [W-1:0] mm, logic [W-1:0] ee, logic [W-1:0] nn,
                     key_size_e sz, output int cyc);
    @(posedge clk);
    #1;
    m = mm; e = ee; n = nn; size = sz; go = 1'b1;
    @(posedge clk);
    #1;
    go = 1'b0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    cyc--;
    checks++;
    if (c !== powmod(mm, ee, nn)) begin
      failures++;
      $display("FAIL %s: got %0h", what, c);
    end
    $display("%-34s %8d cycles  %10.3f us at 20 MHz", what, cyc, cyc * 0.05);
  endtask

  initial begin
    int cyc;
    rst = 1'b1; go = 1'b0; m = '0; e = '0; n = '0; size = KEY_32;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    run("32-bit,   e = 0x41",     W'(32'h2400C5F), W'(32'h41),     W'(32'hFFFF_FFFB), KEY_32, cyc);
    run("32-bit,   e = 0x13A0C2", W'(32'h2400C5F), W'(32'h13A0C2), W'(32'hFFFF_FFFB), KEY_32, cyc);
    run("256-bit,  n = 63, e = 5",  W'(7), W'(5), W'(63), KEY_256, cyc);
    run("1024-bit, n = 63, e = 5",  W'(7), W'(5), W'(63), KEY_1024, cyc);
    run("1024-bit, full n, e = 5",  N1024 >> 3, W'(5), N1024, KEY_1024, cyc);
    checks++;
    if (cyc > 15812) begin
      failures++;
      $display("FAIL 1024-bit encryption over 790.61 us");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

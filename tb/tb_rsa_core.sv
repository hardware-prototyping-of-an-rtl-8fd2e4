// tb_rsa_core: self-checking test of rsa_core.
//
// Runs the core at W = 64 with 32- and 64-bit key sizes: the worked RSA
// example (n = 63, e = 5, d = 29, message 7 encrypts to 49 and back), edge
// exponents (0, 1) and random operands. Each result is compared with a
// square-and-multiply reference that uses full products and the % operator,
// and the number of cycles from GO to DONE with a count derived from the
// algorithm's arithmetic: per bit of the multiplier 2 + floor(2P/N) cycles,
// plus 2 + floor((P+A)/N) when the bit is one; one scan cycle per exponent bit.
module tb_rsa_core;
  import rsa_pkg::*;

  localparam int unsigned W = 64;

  logic clk = 1'b0;
  logic rst;
  logic go;
  logic [W-1:0] m, e, n, c;
  key_size_e size, c_size;
  logic done, ready;

  int checks = 0;
  int failures = 0;

  rsa_core #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] mulmod(logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] nn);
    logic [2*W-1:0] pr;
    pr = (2*W)'(a) * (2*W)'(b);
    return W'(pr % (2*W)'(nn));
  endfunction

  // Reference value of M^E mod N (right-to-left square and multiply).
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

  // Cycles of one interleaved modular multiplication of a by b over nb bits.
  function automatic int mm_cycles(logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] nn, int nb);
    logic [W+1:0] p, s;
    int cyc;
    p = 0;
    cyc = 0;
    for (int j = nb - 1; j >= 0; j--) begin
      s = p << 1;
      cyc += 2 + int'(s / (W+2)'(nn));
      p = s % (W+2)'(nn);
      if (b[j]) begin
        s = p + (W+2)'(a);
        cyc += 2 + int'(s / (W+2)'(nn));
        p = s % (W+2)'(nn);
      end
    end
    return cyc;
  endfunction

  // Expected GO-to-DONE cycles for the left-to-right method.
  function automatic int exp_cycles(logic [W-1:0] mm, logic [W-1:0] ee, logic [W-1:0] nn, int nb);
    logic [W-1:0] cc;
    logic st;
    int cyc;
    st = 0;
    cc = 1;
    cyc = 0;
    for (int i = nb - 1; i >= 0; i--) begin
      cyc += 1;
      if (st) begin
        cyc += mm_cycles(cc, cc, nn, nb);
        cc = mulmod(cc, cc, nn);
        if (ee[i]) begin
          cyc += mm_cycles(mm, cc, nn, nb);   // A = M, B = C
          cc = mulmod(cc, mm, nn);
        end
      end else if (ee[i]) begin
        st = 1;
        cc = mm;
      end
    end
    return cyc;
  endfunction

  task automatic run(logic [W-1:0] mm, logic [W-1:0] ee, logic [W-1:0] nn, key_size_e sz,
                     logic [W-1:0] expect_c);
    int cyc, exp_cyc;
    @(posedge clk);
    while (!ready) @(posedge clk);
    #1;
    m = mm; e = ee; n = nn; size = sz; go = 1'b1;
    @(posedge clk);
    #1;
    go = 1'b0;
    m = '0; e = '0; n = '0;           // inputs need not be held
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    cyc--;
    begin
      logic [W-1:0] msk;
      msk = {W{1'b1}} >> (W - key_bits(sz));
      exp_cyc = exp_cycles(mm & msk, ee & msk, nn & msk, key_bits(sz));
    end
    checks += 3;
    if (c !== expect_c) begin
      failures++;
      $display("FAIL result: m=%0h e=%0h n=%0h size=%0d c=%0h expected %0h", mm, ee, nn,
               key_bits(sz), c, expect_c);
    end
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL cycles: m=%0h e=%0h n=%0h got %0d expected %0d", mm, ee, nn, cyc, exp_cyc);
    end
    if (c_size != sz) begin
      failures++;
      $display("FAIL c_size");
    end
  endtask

  initial begin
    rst = 1'b1; go = 1'b0; m = '0; e = '0; n = '0; size = KEY_32;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (!ready || done) begin
      failures++;
      $display("FAIL: not idle after reset");
    end

    // worked example: encryption then decryption, both key sizes
    run(64'h7,  64'h5,  64'h3F, KEY_32, 64'd49);
    run(64'h31, 64'h1D, 64'h3F, KEY_32, 64'd7);
    run(64'h7,  64'h5,  64'h3F, KEY_64, 64'd49);
    run(64'h31, 64'h1D, 64'h3F, KEY_64, 64'd7);
    // edge exponents
    run(64'h1234, 64'h0, 64'hFFFF_FFF1, KEY_32, 64'd1);
    run(64'h1234, 64'h1, 64'hFFFF_FFF1, KEY_32, 64'h1234);
    // bits above the 32-bit key size are ignored
    run(64'hFFFF_0000_0000_0007, 64'hAAAA_0000_0000_0005, 64'h5555_0000_0000_003F, KEY_32, 64'd49);

    // random operands
    for (int k = 0; k < 40; k++) begin
      logic [W-1:0] nn, mm, ee;
      key_size_e sz;
      sz = (k % 2) ? KEY_64 : KEY_32;
      nn = {$urandom, $urandom};
      ee = {$urandom, $urandom};
      if (sz == KEY_32) begin
        nn[W-1:32] = '0;
        ee[W-1:32] = '0;
      end
      if (k % 4 == 0) ee = ee & W'(32'hFF);
      nn[0] = 1'b1;
      if (nn < 3) nn = 3;
      mm = {$urandom, $urandom} % nn;
      run(mm, ee, nn, sz, powmod(mm, ee, nn));
    end

    // synchronous reset in the middle of an operation
    @(posedge clk);
    #1;
    m = 64'h7; e = 64'hFFFF; n = 64'hFFFF_FFFF_FFFF_FFF1; size = KEY_64; go = 1'b1;
    @(posedge clk);
    #1 go = 1'b0;
    repeat (50) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (!ready || done) begin
      failures++;
      $display("FAIL: reset did not return the core to idle");
    end
    run(64'h7, 64'h5, 64'h3F, KEY_32, 64'd49);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rsa_combine: end-to-end test of the RSA engine at its default size
// (1024-bit datapath, two-block buffers), serial message in, serial result out.
//
// A sender shifts message blocks in on data_in (LSB first, start pulse with
// the first bit); a receiver collects the bits on serial while serial_busy is
// high and compares each finished block, in order, with M^E mod N computed by
// a square-and-multiply reference using full products and %. Phases:
//   1. the worked example n = 63, e = 5, d = 29: 7 -> 49 at 512 bits, and back
//      to 7, then encryption at every key size 32..1024;
//   2. random moduli, exponents and messages at 32..256 bits;
//   3. a 1024-bit key pair: encrypt with e = 65537, decrypt with d, compare
//      with the original (p, q are 512-bit primes, n = p*q,
//      d = 65537^-1 mod lcm(p-1, q-1)); the 1024-bit run with e = 5 is also
//      checked against the engine's 790.61 us bound at 20 MHz (15,812 cycles);
//   4. congestion: a 1024-bit result is serialised while 32-bit blocks with a
//      short exponent pour in, so results wait in the output buffer, the core
//      is held back because that buffer is full, blocks wait in the input
//      buffer, it fills, and a block sent while it is full is dropped and
//      raises overflow.
// Each mechanism is counted and one that never happened counts a failure.
module tb_rsa_combine;
  import rsa_pkg::*;

  localparam int unsigned W = MAX_BITS;

  localparam logic [W-1:0] N1024 = W'({
    256'hafa929d18c2806414661f52a1cbfa1cf2ea6bbb231f41cd5f0ca18396e5a7334,
    256'h57d8136b3fdd48bcc1c13409d281187294b27024763bca404e080f74b52e2879,
    256'haeacf1c6b26de6d82adcec1d41f2724375e7d13121dad0bef160862d71e9c918,
    256'hb236c4c24f43a75da2415b13e5e612c27d45f7b5b380f94380594e16deaa4737});
  localparam logic [W-1:0] D1024 = W'({
    256'h4e2c54b9760bbbd8e1c7275161f0e04431092f7f9a5e7e54b16f66bf6c3e6185,
    256'h9a50453815f856edf5b613000a07bc870568b1a27061a45ce0bd128fc82fadff,
    256'hd7a2a0efe4a98622b527a5a91d2987ad28eee1b0db46156c349e1e644e542d16,
    256'h72a9d8fc94c0c1cf5fbf27712b7226b5d49481bcebbd58d53abda0161e82b415});

  logic clk = 1'b0;
  logic rst, start, data_in;
  key_size_e size;
  logic [W-1:0] e, n;
  logic in_valid, prebuf_full, overflow, core_done, serial, serial_busy, done_complete;

  int checks = 0;
  int failures = 0;

  rsa_combine dut (.*);

  always #25 clk = ~clk;                 // 20 MHz

  initial begin : watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference
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

  function automatic logic [W-1:0] mask(key_size_e sz);
    return {W{1'b1}} >> (W - key_bits(sz));
  endfunction

  // ---------------------------------------------------------------- scoreboard
  typedef struct {
    logic [W-1:0] c;
    key_size_e    sz;
  } expect_t;
  expect_t exp_q[$];
  logic [W-1:0] last_result;
  int n_results = 0;

  // receiver
  initial begin : receiver
    logic [W-1:0] got;
    int i;
    #1;
    while (rst) @(posedge clk);           // nothing before reset counts
    forever begin
      @(posedge clk);
      if (serial_busy) begin
        got = '0;
        i = 0;
        while (serial_busy) begin
          got[i] = serial;
          i++;
          @(posedge clk);
        end
        checks += 2;
        if (!done_complete) begin
          failures++;
          $display("FAIL done_complete not high after block");
        end
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result %0h", got);
        end else begin
          expect_t x;
          x = exp_q.pop_front();
          if (got !== x.c || i != key_bits(x.sz)) begin
            failures++;
            $display("FAIL result %0h (%0d bits) expected %0h (%0d bits)", got, i, x.c,
                     key_bits(x.sz));
          end
        end
        last_result = got;
        n_results++;
      end
    end
  end

  // ---------------------------------------------------------------- mechanisms
  int n_pre_hold = 0, n_post_hold = 0, n_post_backpressure = 0, n_pre_full = 0;
  int n_drop = 0, n_sub = 0, n_zero_skip = 0;
  bit sizes_seen[6];

  always @(posedge clk) begin
    if (!rst) begin
      if (!dut.u_prebuf.u_fifo.empty && !dut.core_go) n_pre_hold++;
      if (!dut.u_postbuf.u_fifo.empty && serial_busy) n_post_hold++;
      if (dut.core_ready && !dut.post_can_accept) n_post_backpressure++;
      if (prebuf_full) n_pre_full++;
      // a successful trial subtraction: the working value is reduced
      if ((int'(dut.u_core.state) == 3) && !dut.u_core.neg) n_sub++;
      if ((int'(dut.u_core.state) == 1) && !dut.u_core.started && !dut.u_core.ebit)
        n_zero_skip++;
      if (dut.core_go) sizes_seen[int'(dut.core_size)] = 1'b1;
    end
  end

  // ---------------------------------------------------------------- sender
  task automatic send(logic [W-1:0] mm, key_size_e sz);
    int nb;
    nb = key_bits(sz);
    for (int i = 0; i < nb; i++) begin
      start   = (i == 0);
      size    = sz;
      data_in = mm[i];
      @(posedge clk);
      #1;
    end
    start   = 1'b0;
    data_in = 1'b0;
    // in_valid has just risen; the block is stored at the next edge unless full
    if (prebuf_full) begin
      n_drop++;
    end else begin
      expect_t x;
      x.c  = powmod(mm & mask(sz), e & mask(sz), n & mask(sz));
      x.sz = sz;
      exp_q.push_back(x);
    end
  endtask

  task automatic drain();
    while (exp_q.size() != 0 || serial_busy || !dut.core_ready || !dut.u_prebuf.u_fifo.empty) begin
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1;
  endtask

  task automatic check_last(logic [W-1:0] want, string what);
    checks++;
    if (last_result !== want) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, last_result, want);
    end
  endtask

  int t0, t1, cyc;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    cyc = 0;
    rst = 1'b1; start = 1'b0; data_in = 1'b0; size = KEY_32; e = '0; n = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // 1. worked example
    e = W'(5); n = W'(63);
    send(W'(7), KEY_512);
    drain();
    check_last(W'(49), "encryption of 7 at 512 bits");
    e = W'(29);
    send(W'(49), KEY_512);
    drain();
    check_last(W'(7), "decryption of 49 at 512 bits");
    e = W'(5);
    for (int s = 0; s < 6; s++) begin
      send(W'(7), key_size_e'(s));
      drain();
      check_last(W'(49), "encryption of 7");
    end
    // latency of the 1024-bit run with e = 5, measured GO to DONE
    begin
      fork
        send(W'(7), KEY_1024);
        begin
          @(posedge clk iff dut.core_go);
          t0 = cyc;
          @(posedge clk iff dut.core_done);
          t1 = cyc;
        end
      join
      drain();
      checks++;
      if (t1 - t0 > 15812) begin
        failures++;
        $display("FAIL 1024-bit e=5 run took %0d cycles", t1 - t0);
      end
      $display("1024-bit key, e = 5: %0d cycles GO to DONE", t1 - t0);
    end

    // 2. random keys at 32..256 bits
    for (int k = 0; k < 24; k++) begin
      key_size_e sz;
      logic [W-1:0] r;
      sz = key_size_e'(k % 4);
      for (int j = 0; j < W / 32; j++) r = {r[W-33:0], $urandom};
      n = (r | W'(1)) & mask(sz);
      n[key_bits(sz)-1] = 1'b1;
      for (int j = 0; j < W / 32; j++) r = {r[W-33:0], $urandom};
      e = r & mask(sz);
      if (k % 3 == 0) e = e & W'(16'hFFFF);
      for (int j = 0; j < W / 32; j++) r = {r[W-33:0], $urandom};
      send((r & mask(sz)) % n, sz);
      drain();
    end

    // 3. 1024-bit key pair round trip
    begin
      logic [W-1:0] msg, cph;
      for (int j = 0; j < W / 32; j++) msg = {msg[W-33:0], $urandom};
      msg[W-1:W-8] = '0;                  // below n
      n = N1024;
      e = W'(65537);
      send(msg, KEY_1024);
      drain();
      cph = last_result;
      e = D1024;
      send(cph, KEY_1024);
      drain();
      check_last(msg, "1024-bit decryption round trip");
    end

    // 4. congestion
    n = W'(32'hFFFF_FFFB);
    e = W'(1);                            // results as fast as blocks arrive
    send(W'(32'h1234_5678), KEY_1024);    // long serial output
    while (!serial_busy) begin
      @(posedge clk);
      #1;
    end
    for (int k = 0; k < 10; k++) send(W'($urandom) % n, KEY_32);
    drain();
    checks++;
    if (n_drop == 0 || !overflow) begin
      failures++;
      $display("FAIL congestion: drops=%0d overflow=%0b", n_drop, overflow);
    end
    // reset clears the overflow flag
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL overflow not cleared by reset");
    end
    e = W'(3);
    send(W'(2), KEY_32);
    drain();
    check_last(W'(8), "after reset");

    // mechanisms
    $display("held in input buffer %0d, held in output buffer %0d, core held back %0d,",
             n_pre_hold, n_post_hold, n_post_backpressure);
    $display("input buffer full %0d, dropped %0d, successful subtractions %0d, skipped zeros %0d, results %0d",
             n_pre_full, n_drop, n_sub, n_zero_skip, n_results);
    checks += 6;
    if (n_pre_hold == 0)          begin failures++; $display("FAIL no input-buffer wait");  end
    if (n_post_hold == 0)         begin failures++; $display("FAIL no output-buffer wait"); end
    if (n_post_backpressure == 0) begin failures++; $display("FAIL core never held back"); end
    if (n_pre_full == 0)          begin failures++; $display("FAIL input buffer never full"); end
    if (n_sub == 0)        begin failures++; $display("FAIL no reduction by subtraction"); end
    if (n_zero_skip == 0)         begin failures++; $display("FAIL no exponent zero skipped"); end
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (!sizes_seen[s]) begin
        failures++;
        $display("FAIL key size %0d never used", key_bits(key_size_e'(s)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

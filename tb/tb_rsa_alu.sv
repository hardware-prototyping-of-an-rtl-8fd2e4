// tb_rsa_alu: self-checking test of rsa_alu at its default width (1026 bits).
//
// Random and corner operands are applied for both operations; the expected
// sum or difference is formed in the testbench with 1027-bit arithmetic and
// truncated, and the sign bit the core relies on is checked against a
// magnitude comparison of the operands.
module tb_rsa_alu;

  localparam int unsigned W = 1026;

  logic [W-1:0] a, b, y;
  logic         sub;
  int checks = 0;
  int failures = 0;

  rsa_alu dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r = {r[W-33:0], $urandom};
    return r;
  endfunction

  task automatic check(logic [W-1:0] aa, logic [W-1:0] bb, logic s);
    logic [W:0] ref_y;
    a = aa; b = bb; sub = s;
    #1;
    ref_y = s ? ({1'b0, aa} - {1'b0, bb}) : ({1'b0, aa} + {1'b0, bb});
    checks++;
    if (y !== ref_y[W-1:0]) begin
      failures++;
      $display("FAIL sub=%0b", s);
    end
    // with both operands below 2^(W-2), the top bit of a difference is its sign
    if (s && aa[W-1:W-2] == 0 && bb[W-1:W-2] == 0) begin
      checks++;
      if (y[W-1] !== (aa < bb)) begin
        failures++;
        $display("FAIL sign");
      end
    end
  endtask

  initial begin
    check('0, '0, 1'b0);
    check('0, W'(1), 1'b1);
    check({W{1'b1}}, W'(1), 1'b0);
    check(W'(63), W'(63), 1'b1);
    check(W'(62), W'(63), 1'b1);
    for (int k = 0; k < 200; k++) begin
      logic [W-1:0] aa, bb;
      aa = rnd();
      bb = rnd();
      if (k % 2) begin
        aa[W-1:W-2] = 2'b00;
        bb[W-1:W-2] = 2'b00;
      end
      check(aa, bb, k[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

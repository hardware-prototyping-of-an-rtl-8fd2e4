// tb_rsa_prebuffer: self-checking test of rsa_prebuffer (W = 32, DEPTH = 2).
//
// A producer raises in_valid (a level, as the serial converter does) with
// random blocks; a consumer acts like the core, dropping core_ready for a
// random time after each go. Blocks must reach m/m_size in order with go,
// go must never be raised without core_ready or with nothing stored, and a
// block arriving while full must be dropped and set overflow.
module tb_rsa_prebuffer;
  import rsa_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned DEPTH = 2;

  logic clk = 1'b0;
  logic rst, in_valid, core_ready, go, full, overflow;
  logic [W-1:0] in_data, m;
  key_size_e in_size, m_size;
  int checks = 0;
  int failures = 0;
  logic [W+2:0] q[$];
  int busy_left = 0;
  int n_go = 0, n_drop = 0, n_held = 0;

  rsa_prebuffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer model of the core
  always @(posedge clk) begin
    if (!rst) begin
      if (go) begin
        checks++;
        if (!core_ready || q.size() == 0 || {m_size, m} !== q[0]) begin
          failures++;
          $display("FAIL go: ready=%0b stored=%0d m=%0h", core_ready, q.size(), m);
        end
        if (q.size() > 0) void'(q.pop_front());
        n_go++;
        busy_left <= 1 + $urandom % 12;
      end else if (busy_left > 0) begin
        busy_left <= busy_left - 1;
      end
      if (core_ready && !go && q.size() > 0) begin
        failures++;
        $display("FAIL: block waiting, core ready, no go");
      end
      if (!core_ready && q.size() > 0) n_held++;
    end
  end
  assign core_ready = (busy_left == 0) && !rst;

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_data = '0; in_size = KEY_32;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      logic was_full;
      in_data  = $urandom;
      in_size  = key_size_e'($urandom % 6);
      was_full = full;
      in_valid = 1'b1;                       // rising edge stores the block
      @(posedge clk);
      #1;
      if (!was_full) q.push_back({in_size, in_data});
      else n_drop++;
      if (n_drop > 0) begin
        checks++;
        if (!overflow) begin
          failures++;
          $display("FAIL overflow not set");
        end
      end
      in_valid = ($urandom % 2);             // level may stay high a while
      repeat ($urandom % ((k / 100) == 1 ? 3 : 8)) begin
        @(posedge clk);
        #1;
      end
      in_valid = 1'b0;
      @(posedge clk);
      #1;
    end
    repeat (200) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0 || n_drop == 0 || n_held == 0) begin
      failures++;
      $display("FAIL end: left=%0d drops=%0d held=%0d", q.size(), n_drop, n_held);
    end
    $display("go=%0d dropped=%0d", n_go, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

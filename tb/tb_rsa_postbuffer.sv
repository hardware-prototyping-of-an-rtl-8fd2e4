// tb_rsa_postbuffer: self-checking test of rsa_postbuffer (W = 32, DEPTH = 2).
//
// A producer behaves like the core: it starts a job only while can_accept is
// high, lowers its done level for a random run time and raises it with a new
// random result. A consumer behaves like the serial converter: busy for a
// random time after each out_start. Results must come out in order, out_start
// only when not busy and something is stored, a waiting result must start as
// soon as the consumer is idle, and no result may be lost.
module tb_rsa_postbuffer;
  import rsa_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned DEPTH = 2;

  logic clk = 1'b0;
  logic rst, in_done, out_busy, out_start, can_accept;
  logic [W-1:0] in_data, out_data;
  key_size_e in_size, out_size;
  int checks = 0;
  int failures = 0;
  logic [W+2:0] q[$];
  int busy_left = 0;
  int n_out = 0, n_in = 0, n_wait_full = 0, n_held = 0;

  rsa_postbuffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer model of the serial converter
  assign out_busy = (busy_left > 0);
  always @(posedge clk) begin
    if (!rst) begin
      if (out_start) begin
        checks++;
        if (out_busy || q.size() == 0 || {out_size, out_data} !== q[0]) begin
          failures++;
          $display("FAIL out_start: busy=%0b stored=%0d data=%0h", out_busy, q.size(), out_data);
        end
        if (q.size() > 0) void'(q.pop_front());
        n_out++;
        busy_left <= 1 + $urandom % ((n_out / 50) % 2 ? 60 : 5);
      end else if (busy_left > 0) begin
        busy_left <= busy_left - 1;
        if (q.size() > 0) n_held++;
      end
      if (!out_busy && !out_start && q.size() > 0) begin
        failures++;
        $display("FAIL: result waiting, converter idle, no out_start");
      end
    end
  end

  initial begin
    rst = 1'b1; in_done = 1'b0; in_data = '0; in_size = KEY_32;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      // wait until a job may be started
      while (!can_accept) begin
        n_wait_full++;
        @(posedge clk);
        #1;
      end
      in_done = 1'b0;                        // job starts, DONE falls
      repeat (1 + $urandom % 6) begin
        @(posedge clk);
        #1;
      end
      in_data = $urandom;
      in_size = key_size_e'($urandom % 6);
      in_done = 1'b1;                        // result ready
      @(posedge clk);
      #1;
      q.push_back({in_size, in_data});
      n_in++;
    end
    while (q.size() > 0) begin
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_out != n_in || n_wait_full == 0 || n_held == 0) begin
      failures++;
      $display("FAIL end: in=%0d out=%0d waits=%0d held=%0d", n_in, n_out, n_wait_full, n_held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

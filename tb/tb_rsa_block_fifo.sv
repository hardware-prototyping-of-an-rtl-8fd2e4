// tb_rsa_block_fifo: self-checking test of rsa_block_fifo (W = 16, DEPTH = 4).
//
// Random push and pop requests, including pushes into a full FIFO and pops
// from an empty one, are compared cycle by cycle with a queue model: head
// entry, empty, full and count.
module tb_rsa_block_fifo;

  localparam int unsigned W = 16;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0;
  logic rst, push, pop, empty, full;
  logic [W+2:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] count;
  int checks = 0;
  int failures = 0;
  logic [W+2:0] q[$];
  int n_full_push = 0, n_empty_pop = 0;

  rsa_block_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; push = 1'b0; pop = 1'b0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      // compare state with model
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) ||
          int'(count) != q.size() || (q.size() > 0 && rd_data !== q[0])) begin
        failures++;
        $display("FAIL k=%0d model size %0d count %0d", k, q.size(), count);
      end
      push    = ($urandom % 100) < ((k / 500) % 2 ? 70 : 35);
      pop     = ($urandom % 100) < ((k / 500) % 2 ? 35 : 70);
      wr_data = (W+3)'($urandom);
      begin
        int s0;
        s0 = q.size();
        @(posedge clk);
        // requests are judged on the fill level before the edge
        if (pop && s0 > 0) void'(q.pop_front());
        else if (pop) n_empty_pop++;
        if (push && s0 < DEPTH) q.push_back(wr_data);
        else if (push) n_full_push++;
      end
      #1;
    end
    checks++;
    if (n_full_push == 0 || n_empty_pop == 0) begin
      failures++;
      $display("FAIL: full push or empty pop never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

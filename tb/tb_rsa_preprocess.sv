// tb_rsa_preprocess: self-checking test of rsa_preprocess (W = 128).
//
// Random blocks of every key size up to 128 bits are sent bit-serially, least
// significant bit first, starting in the cycle of the start pulse. The test
// checks that valid is low during the conversion, rises exactly key_bits
// cycles after start, holds the block and its size code, and that a start in
// the middle of a block restarts the conversion.
module tb_rsa_preprocess;
  import rsa_pkg::*;

  localparam int unsigned W = 128;

  logic clk = 1'b0;
  logic rst, start, data_in, valid;
  key_size_e size, size_out;
  logic [W-1:0] data_out;
  int checks = 0;
  int failures = 0;

  rsa_preprocess #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send nbits of blk; abort_after >= 0 stops after that many bits
  task automatic send(logic [W-1:0] blk, key_size_e sz, int abort_after);
    int nb;
    nb = key_bits(sz);
    for (int i = 0; i < nb; i++) begin
      if (i == abort_after) return;
      start   = (i == 0);
      size    = (i == 0) ? sz : key_size_e'($urandom % 6);  // ignored after start
      data_in = blk[i];
      @(posedge clk);
      #1;
      checks++;
      if (valid !== (i == nb - 1)) begin
        failures++;
        $display("FAIL valid at bit %0d of %0d", i, nb);
      end
    end
    start = 1'b0;
    data_in = 1'b1;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; data_in = 1'b0; size = KEY_32;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 30; k++) begin
      logic [W-1:0] blk, msk;
      key_size_e sz;
      sz  = key_size_e'(k % 3);                 // 32, 64, 128
      blk = {$urandom, $urandom, $urandom, $urandom};
      if (k % 5 == 3) send(~blk, sz, 7 + k);    // aborted block, restarted below
      send(blk, sz, -1);
      msk = {W{1'b1}} >> (W - key_bits(sz));
      repeat (k % 4) begin
        @(posedge clk);
        #1;
      end
      checks += 3;
      if (!valid) begin
        failures++;
        $display("FAIL valid not held");
      end
      if (data_out !== (blk & msk)) begin
        failures++;
        $display("FAIL data %0h expected %0h", data_out, blk & msk);
      end
      if (size_out !== sz) begin
        failures++;
        $display("FAIL size_out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rsa_postprocess: self-checking test of rsa_postprocess (W = 128).
//
// Random blocks of 32, 64 and 128 bits are loaded with a done pulse. The test
// collects serial while busy and checks that exactly key_bits bits come out,
// least significant first, starting the cycle after done, that valid rises
// the cycle after the last bit and stays high, that serial is 0 while idle,
// and that a done pulse while busy restarts with the new block.
module tb_rsa_postprocess;
  import rsa_pkg::*;

  localparam int unsigned W = 128;

  logic clk = 1'b0;
  logic rst, done, serial, busy, valid;
  logic [W-1:0] data_in;
  key_size_e size;
  int checks = 0;
  int failures = 0;

  rsa_postprocess #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(logic [W-1:0] blk, key_size_e sz);
    done = 1'b1; data_in = blk; size = sz;
    @(posedge clk);
    #1;
    done = 1'b0;
    data_in = ~blk;                       // must have been captured
    size = key_size_e'($urandom % 6);
  endtask

  initial begin
    rst = 1'b1; done = 1'b0; data_in = '0; size = KEY_32;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 30; k++) begin
      logic [W-1:0] blk, got;
      key_size_e sz;
      int nb;
      sz  = key_size_e'(k % 3);
      nb  = key_bits(sz);
      blk = {$urandom, $urandom, $urandom, $urandom};
      if (k % 7 == 2) begin               // interrupted block
        load(~blk, KEY_128);
        repeat (5) begin
          @(posedge clk);
          #1;
        end
      end
      load(blk, sz);
      got = '0;
      for (int i = 0; i < nb; i++) begin
        checks++;
        if (!busy || valid) begin
          failures++;
          $display("FAIL busy/valid during bit %0d", i);
        end
        got[i] = serial;
        @(posedge clk);
        #1;
      end
      checks += 2;
      if (busy || !valid) begin
        failures++;
        $display("FAIL end of block: busy=%0b valid=%0b", busy, valid);
      end
      if (got !== (blk & ({W{1'b1}} >> (W - nb)))) begin
        failures++;
        $display("FAIL bits %0h expected %0h", got, blk);
      end
      repeat (k % 3) begin
        @(posedge clk);
        #1;
        checks++;
        if (serial || !valid) begin
          failures++;
          $display("FAIL idle serial/valid");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

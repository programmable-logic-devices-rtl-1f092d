// tb_cfg_sram: checks the CLB configuration store. After reset the word is
// zero; 17 shifted bits land in the word first bit in the MSB; the serial
// output repeats the input 17 shifts later; the word holds while cfg_shift
// is low.
module tb_cfg_sram;
  import fpga_pkg::*;
  logic clk, rst_n, cfg_shift, cfg_in, cfg_out;
  clb_cfg_t cfg;
  logic [CFG_BITS-1:0] word, expect_word;
  logic hist [$];
  int checks = 0, failures = 0;

  cfg_sram dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_shift = 0; cfg_in = 0;
    rst_n = 0;
    #12;
    checks++;
    if (cfg !== '0 || cfg_out !== 1'b0) begin
      failures++;
      $display("not cleared by reset: %h", cfg);
    end
    rst_n = 1;
    for (int w = 0; w < 50; w++) begin
      word = CFG_BITS'($urandom);
      for (int b = CFG_BITS - 1; b >= 0; b--) begin
        @(negedge clk);
        cfg_shift = 1;
        cfg_in = word[b];
        // serial output: the bit shifted in 17 shifts ago (0 before that)
        checks++;
        if (cfg_out !== (hist.size() >= CFG_BITS ? hist[hist.size() - CFG_BITS] : 1'b0)) begin
          failures++;
          $display("cfg_out wrong at word %0d bit %0d", w, b);
        end
        hist.push_back(word[b]);
        @(posedge clk);
      end
      @(negedge clk);
      cfg_shift = 0;
      cfg_in = ~cfg_in;
      expect_word = word;
      checks++;
      if (cfg !== clb_cfg_t'(expect_word)) begin
        failures++;
        $display("word %0d loaded %h expected %h", w, cfg, expect_word);
      end
      // hold for a few cycles
      repeat (1 + $urandom_range(3)) begin
        @(negedge clk);
        cfg_in = 1'($urandom);
      end
      checks++;
      if (cfg !== clb_cfg_t'(expect_word)) begin
        failures++;
        $display("word %0d not held: %h expected %h", w, cfg, expect_word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

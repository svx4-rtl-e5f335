// tb_config_reg: shifts random 192-bit words into the configuration
// register, checks that the shadow outputs hold the old value until the
// load strobe and the new one after it, that the first bit sent ends in
// bit 0, and that the serial output returns the previous word.
module tb_config_reg;
  import svx4_pkg::*;
  logic clk = 0, rst_n = 0, shift_en = 0, din = 0, load = 0, dout;
  cfg_t cfg;
  logic [191:0] word, prev_word, got;
  int checks = 0, failures = 0;

  config_reg dut (.clk, .rst_n, .shift_en, .din, .load, .dout, .cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (cfg != '0) failures++;
    prev_word = '0;
    for (int n = 0; n < 5; n++) begin
      for (int i = 0; i < 6; i++) word[i*32 +: 32] = $urandom;
      shift_en = 1;
      for (int i = 0; i < 192; i++) begin
        din = word[i];
        got[i] = dout;
        @(negedge clk);
      end
      shift_en = 0;
      checks++; if (got != prev_word) begin failures++; $display("FAIL serial out"); end
      checks++; if (cfg != cfg_t'(prev_word)) begin failures++; $display("FAIL shadow changed before load"); end
      load = 1; @(negedge clk); load = 0;
      checks++; if (cfg != cfg_t'(word)) begin failures++; $display("FAIL shadow after load"); end
      checks++; if (cfg.chan_mask != word[127:0] || cfg.threshold != word[135:128] || cfg.latency != word[144:139])
        begin failures++; $display("FAIL field layout"); end
      prev_word = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

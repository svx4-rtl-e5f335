// tb_adc_comparators: drives known levels into the ADC comparator model
// and checks, clock by clock, when each fast discriminator fires (ramp
// reaching the level at the trimmed slope), that the delay comparator
// follows SLOW_DELAY clocks later, and that the RTPS threshold
// discriminator fires TH_DELAY clocks after the RTPS_NCH-th channel.
module tb_adc_comparators;
  localparam int NCH = 128, LW = 10, RN = 40, THD = 2, SD = 4;
  logic clk = 0, rst_n = 0, ramp_run = 0;
  logic [2:0] ramp_trim = 0;
  logic [NCH-1:0][LW-1:0] level;
  logic [NCH-1:0] fast_fire, slow_fire;
  logic thresh_fire;
  int checks = 0, failures = 0;

  adc_comparators #(.NCH(NCH), .LW(LW), .RTPS_NCH(RN), .TH_DELAY(THD), .SLOW_DELAY(SD))
    dut (.clk, .rst_n, .ramp_run, .ramp_trim, .level, .fast_fire, .slow_fire, .thresh_fire);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_fire [NCH];
    int sorted [$];
    int t_th;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trim = 0; trim < 3; trim++) begin
      ramp_trim = 3'(trim);
      for (int ch = 0; ch < NCH; ch++) level[ch] = LW'($urandom_range(0, 300));
      sorted = {};
      for (int ch = 0; ch < NCH; ch++) begin
        // ramp value at clock t is t * (trim + 1)
        t_fire[ch] = (int'(level[ch]) + trim) / (trim + 1);
        sorted.push_back(t_fire[ch]);
      end
      sorted.sort();
      t_th = sorted[RN - 1] + THD;
      @(negedge clk); ramp_run = 1; #1;
      for (int t = 0; t < 320; t++) begin
        for (int ch = 0; ch < NCH; ch++) begin
          check(fast_fire[ch] == (t >= t_fire[ch]), $sformatf("fast ch%0d t%0d", ch, t));
          check(slow_fire[ch] == (t >= t_fire[ch] + SD), $sformatf("slow ch%0d t%0d", ch, t));
        end
        check(thresh_fire == (t >= t_th), $sformatf("threshold t%0d", t));
        @(negedge clk);
      end
      ramp_run = 0;
      @(negedge clk);
      check(fast_fire == 0 && slow_fire == 0 && !thresh_fire, "reset with ramp");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

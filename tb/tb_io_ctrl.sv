// tb_io_ctrl: steps the backend sequencer through configuration,
// digitize (standard and RTPS start, normal end and time-out) and readout,
// with stand-ins for the counter, the threshold discriminator and the
// readout array, and checks every control output against the expected
// sequence and its cycle counts.
module tb_io_ctrl;
  import svx4_pkg::*;
  logic clk = 0, rst_n = 0;
  be_mode_e mode = MODE_ACQUIRE;
  logic rtps_en = 0, thresh_fire = 0, cnt_at_max, fifo_empty;
  logic cfg_shift, cfg_load, dig_clear, cell_busy, ramp_run, cnt_en, dig_end, dig_done;
  logic addr_load, ro_en, ro_done;
  int cnt = 0, words = 0;
  int checks = 0, failures = 0;

  io_ctrl dut (.*);

  // simple counter stand-in, full scale 255
  assign cnt_at_max = (cnt == 255);
  always @(posedge clk) begin
    if (dig_clear) cnt <= 0;
    else if (cnt_en && cnt < 255) cnt <= cnt + 1;
    if (addr_load) words <= 5;
    else if (ro_en && words > 0) words <= words - 1;
  end
  assign fifo_empty = (words == 0);

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
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // configuration: shift while INIT, load when leaving
    mode = MODE_INIT; #1;
    n = 0;
    for (int i = 0; i < 10; i++) begin n += cfg_shift; check(!cfg_load, "no load during init"); @(negedge clk); end
    check(n == 10, "shift every init clock");
    mode = MODE_ACQUIRE; #1;
    check(cfg_load && !cfg_shift, "load on leaving init");
    @(negedge clk);
    check(!cfg_load, "load is one clock");
    // digitize, standard mode: counter runs with the ramp, 255 clocks
    for (int rtps = 0; rtps < 3; rtps++) begin
      int t_ramp, t_cnt;
      rtps_en = (rtps != 0);
      mode = MODE_DIGITIZE;
      @(negedge clk);
      check(dig_clear && cell_busy && !ramp_run, "clear first");
      @(negedge clk);
      t_ramp = 0; t_cnt = 0;
      while (!dig_done && t_ramp < 2000) begin
        check(ramp_run && cell_busy, "ramp runs");
        if (rtps == 1) thresh_fire = (t_ramp >= 30);
        #1;
        t_cnt += cnt_en;
        if (rtps_en && rtps == 1) check(cnt_en == (t_ramp >= 30), "RTPS counter start");
        if (!rtps_en) check(cnt_en, "standard counter start");
        @(negedge clk);
        t_ramp++;
      end
      thresh_fire = 0;
      if (rtps == 0) check(t_ramp == 256 && t_cnt == 256, $sformatf("standard conversion %0d clocks", t_ramp));
      if (rtps == 1) check(t_ramp == 286 && t_cnt == 256, $sformatf("RTPS conversion %0d clocks", t_ramp));
      if (rtps == 2) check(t_ramp == 1024 && t_cnt == 0, $sformatf("time-out %0d clocks", t_ramp));
      check(dig_done && cell_busy && !ramp_run, "digitize done, cell still in use");
      mode = MODE_ACQUIRE; @(negedge clk); @(negedge clk);
      check(!dig_done, "back to idle");
    end
    // readout: preset once, then run until the array is empty
    mode = MODE_READOUT;
    @(negedge clk);
    check(addr_load && !ro_en, "address preset");
    n = 0;
    @(negedge clk);
    while (!ro_done && n < 100) begin check(ro_en, "readout running"); n++; @(negedge clk); end
    check(n == 6, $sformatf("readout length %0d", n));
    mode = MODE_ACQUIRE; @(negedge clk); @(negedge clk);
    check(!ro_done && !ro_en, "readout ends");
    check(!cell_busy, "cell released after readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

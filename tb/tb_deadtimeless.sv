// tb_deadtimeless: pedestal scan across the pipeline with digitize and
// readout running concurrently with acquisition and triggering.
//
// All channels carry the same constant pedestal of 114 ramp units. The test
// triggers 100 samples in standard mode and 100 in RTPS mode, always
// keeping a new trigger arriving while an earlier sample is being
// converted, and reads every channel out (read-all mode). Each sample must
// give the same value whatever the chip was doing when it was taken and
// whichever of the 46 cells held it: 114 + 4 (the delay comparator
// pedestal) = 118 counts in standard mode, and 4 - 2 = 2 counts in RTPS
// mode, where the common pedestal is subtracted and only the difference
// between the delay comparator and threshold discriminator delays remains.
// It also checks that every one of the 46 cells was used.
module tb_deadtimeless;
  import svx4_pkg::*;
  localparam int LW = 10, LAT = 12, PED = 114;

  logic fe_clk = 0, be_clk = 0, rst_n = 0, l1a = 0, cfg_din = 0;
  logic [NCH-1:0][LW-1:0] sample;
  logic [NCH-1:0] preamp_reset;
  logic [2:0] preamp_risetime;
  logic [CELL_BITS-1:0] wr_cell, rd_cell;
  logic rd_valid, l1a_overflow, cfg_dout, dig_done, ro_done, dout_valid, dout_is_addr;
  logic [$clog2(NBUF+1)-1:0] nheld;
  logic [$clog2(NCH+1)-1:0] nflag;
  logic [7:0] dout;
  be_mode_e mode = MODE_ACQUIRE;

  svx4_top dut (.*);

  always #66 fe_clk = ~fe_clk;
  always #5  be_clk = ~be_clk;

  int checks = 0, failures = 0;
  int n_held_model = 0;
  int n_conc = 0;
  bit used [NCELL];
  cfg_t cfg;

  always_comb for (int ch = 0; ch < NCH; ch++) sample[ch] = LW'(PED);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_l1a();
    @(negedge fe_clk); l1a = 1;
    @(negedge fe_clk); l1a = 0;
    n_held_model++;
  endtask

  task automatic load_cfg();
    logic [CFG_BITS-1:0] w;
    w = CFG_BITS'(cfg);
    @(negedge be_clk);
    mode = MODE_INIT;
    for (int i = 0; i < CFG_BITS; i++) begin cfg_din = w[i]; @(negedge be_clk); end
    mode = MODE_ACQUIRE;
    @(negedge be_clk);
  endtask

  task automatic scan(input int nev, input int expect_val);
    int nbytes;
    for (int e = 0; e < nev; e++) begin
      if (n_held_model == 0) begin send_l1a(); repeat (2) @(negedge fe_clk); end
      used[rd_cell] = 1;
      fork
        begin
          @(negedge be_clk); mode = MODE_DIGITIZE;
          while (!dig_done) @(negedge be_clk);
          mode = MODE_ACQUIRE;
        end
        begin
          // a trigger arrives while the conversion runs
          repeat (e % 7 + 1) @(negedge fe_clk);
          if (n_held_model < NBUF && !dig_done) begin send_l1a(); n_conc++; end
        end
      join
      repeat (4) @(negedge fe_clk);
      check(int'(nheld) == n_held_model, "held until read out");
      @(negedge be_clk); mode = MODE_READOUT;
      nbytes = 0;
      while (!ro_done) begin
        @(negedge be_clk);
        if (dout_valid) begin
          if (!dout_is_addr) check(int'(dout) == expect_val, $sformatf("pedestal %0d expected %0d", dout, expect_val));
          nbytes++;
        end
      end
      mode = MODE_ACQUIRE;
      check(nbytes == 2 * NCH, "all channels read");
      repeat (4) @(negedge fe_clk);
      n_held_model--;
      check(int'(nheld) == n_held_model, "released after readout");
    end
  endtask

  initial begin
    int nused;
    cfg = '0;
    cfg.latency  = LAT;
    cfg.read_all = 1'b1;
    repeat (3) @(negedge fe_clk);
    rst_n = 1;
    load_cfg();
    repeat (50) @(negedge fe_clk);
    scan(100, PED + 4);
    cfg.rtps_en = 1'b1;
    load_cfg();
    scan(100, 2);
    nused = 0;
    foreach (used[c]) nused += used[c];
    check(nused == NCELL, $sformatf("cells used %0d", nused));
    check(n_conc > 0, "trigger during conversion");
    $display("cells used=%0d triggers during conversion=%0d", nused, n_conc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

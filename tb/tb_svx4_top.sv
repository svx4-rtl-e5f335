// tb_svx4_top: end-to-end test of the whole chip at its default sizes
// (128 channels, 46 cells, 4 buffers, 8-bit ADC, 192-bit configuration).
//
// The frontend clock runs at 132 ns and the backend clock at 10 ns, both
// free-running. Every sample period the test drives a known pattern into
// all 128 channels: a pedestal common to all channels that changes from
// sample to sample, plus large signals on a few channels. It loads the
// configuration serially, sends level-1 accepts, and runs digitize and
// readout cycles, comparing every byte read out with the value worked out
// from the pattern: level + delay-comparator pedestal in standard mode,
// level - common level + offset in RTPS mode. It checks the conversion
// time in backend clocks, one byte per clock during readout, and the
// count of flagged channels. Mechanisms counted, each of which must occur:
// L1A refused with four cells held, write pointer skipping held cells,
// acquisition during digitize, L1A taken while a sample awaits readout,
// sparse readout, read-all readout, forced channel 63, RTPS conversion,
// a channel held in reset.
module tb_svx4_top;
  import svx4_pkg::*;
  localparam int LW = 10, SD = 4, TD = 2, LAT = 20;

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
  int tick = 0;                  // frontend samples written so far
  int held[$];                   // model: ticks of held samples, trigger order
  int n_refused = 0, n_skip = 0, n_acq_dig = 0, n_l1a_pending = 0;
  int n_sparse = 0, n_readall = 0, n_force63 = 0, n_rtps = 0, n_masked = 0;
  bit in_dig = 0;
  cfg_t cfg;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input pattern of sample p, channel ch, in ramp units.
  function automatic int val(int p, int ch);
    int v;
    v = 20 + (p * 7) % 30;
    if ((p * 13 + ch * 5) % 37 == 0) v += 120 + ch % 50;
    return v;
  endfunction

  // Frontend: drive the next sample, watch the write pointer.
  logic [CELL_BITS-1:0] prev_wr;
  always @(negedge fe_clk) for (int ch = 0; ch < NCH; ch++) sample[ch] = LW'(val(tick + 1, ch));
  always @(posedge fe_clk) if (rst_n) begin
    tick <= tick + 1;
    if (tick > 1 && wr_cell != CELL_BITS'((prev_wr + 1) % NCELL)) n_skip++;
    if (in_dig) n_acq_dig++;
    prev_wr <= wr_cell;
  end

  // Send one L1A in the next sample period; update the held model.
  task automatic send_l1a(input bit expect_refused);
    @(negedge fe_clk);
    l1a = 1;
    #60;
    check(l1a_overflow == expect_refused, "L1A refusal");
    @(posedge fe_clk);
    #1;
    if (expect_refused) n_refused++;
    else held.push_back(tick - LAT);   // tick already counts this edge
    @(negedge fe_clk);
    l1a = 0;
  endtask

  task automatic load_cfg();
    logic [CFG_BITS-1:0] w;
    w = CFG_BITS'(cfg);
    @(negedge be_clk);
    mode = MODE_INIT;
    for (int i = 0; i < CFG_BITS; i++) begin cfg_din = w[i]; @(negedge be_clk); end
    mode = MODE_ACQUIRE;
    @(negedge be_clk);
    check(preamp_reset == cfg.chan_mask && preamp_risetime == cfg.risetime, "configuration loaded");
  endtask

  // Digitize and read out the oldest held sample, check it byte by byte.
  task automatic run_event();
    int h, tc, ncyc, n, first, last;
    int lvl [NCH];
    int exp_b[$], got_b[$], srt[$];
    h = held[0];
    srt = {};
    for (int ch = 0; ch < NCH; ch++) begin
      lvl[ch] = cfg.chan_mask[ch] ? 0 : val(h, ch);
      srt.push_back(lvl[ch]);
    end
    srt.sort();
    tc = srt[39];                        // 40th channel to fire
    check(rd_valid, "a sample is held");
    // digitize
    @(negedge be_clk);
    mode = MODE_DIGITIZE; in_dig = 1;
    ncyc = 0;
    while (!dig_done && ncyc < 5000) begin @(negedge be_clk); ncyc++; end
    in_dig = 0;
    if (cfg.rtps_en) check(ncyc == tc + 260, $sformatf("RTPS conversion time %0d", ncyc));
    else             check(ncyc == 258, $sformatf("standard conversion time %0d", ncyc));
    mode = MODE_ACQUIRE;
    // expected data
    exp_b = {};
    for (int ch = 0; ch < NCH; ch++) begin
      int d;
      if (cfg.rtps_en) d = lvl[ch] + SD - (tc + TD);
      else             d = lvl[ch] + SD;
      if (d < 0) d = 0;
      if (d > 255) d = 255;
      if (cfg.read_all || d >= int'(cfg.threshold) || (cfg.force_ch63 && ch == 63)) begin
        exp_b.push_back(ch); exp_b.push_back(d);
        if (cfg.force_ch63 && ch == 63 && d < int'(cfg.threshold) && !cfg.read_all) n_force63++;
        if (cfg.chan_mask[ch]) n_masked++;
      end
    end
    check(int'(nflag) == exp_b.size() / 2, $sformatf("flagged %0d expected %0d", nflag, exp_b.size() / 2));
    if (cfg.read_all) n_readall++;
    else if (exp_b.size() / 2 < NCH) n_sparse++;
    if (cfg.rtps_en) n_rtps++;
    // a new trigger while this sample waits for readout
    repeat (5) @(negedge fe_clk);
    check(int'(nheld) == held.size(), "cell held until read out");
    if (held.size() < NBUF) begin send_l1a(0); n_l1a_pending++; end
    // readout
    @(negedge be_clk);
    mode = MODE_READOUT;
    got_b = {}; first = -1; last = -1; n = 0;
    while (!ro_done && n < 1000) begin
      @(negedge be_clk); n++;
      if (dout_valid) begin
        got_b.push_back(int'(dout));
        check(dout_is_addr == (got_b.size() % 2 == 1), "address byte first");
        if (first < 0) first = n;
        last = n;
      end
    end
    repeat (2) begin @(negedge be_clk); if (dout_valid) got_b.push_back(int'(dout)); end
    mode = MODE_ACQUIRE;
    void'(held.pop_front());
    repeat (5) @(negedge fe_clk);
    check(int'(nheld) == held.size(), "cell released after readout");
    check(got_b == exp_b, $sformatf("readout of sample %0d: %0d bytes, expected %0d", h, got_b.size(), exp_b.size()));
    if (got_b.size() > 0) check(last - first + 1 == got_b.size(), "one byte per clock");
    repeat (3) @(negedge be_clk);
  endtask

  initial begin
    cfg = '0;
    cfg.latency   = LAT;
    cfg.threshold = 8'd60;
    cfg.chan_mask[10] = 1'b1;
    cfg.chan_mask[77] = 1'b1;
    cfg.risetime  = 3'd5;
    repeat (3) @(negedge fe_clk);
    rst_n = 1;
    load_cfg();
    // fill the four buffers, the fifth trigger is refused
    repeat (60) @(negedge fe_clk);
    for (int i = 0; i < 5; i++) begin send_l1a(i == 4); repeat (3) @(negedge fe_clk); end
    // held samples survive several trips round the ring
    repeat (120) @(negedge fe_clk);
    check(nheld == 4, "four samples held");
    // standard mode, sparse
    for (int e = 0; e < 3; e++) run_event();
    // RTPS mode with channel 63 forced
    cfg.rtps_en = 1; cfg.force_ch63 = 1; cfg.threshold = 8'd30;
    load_cfg();
    for (int e = 0; e < 2; e++) run_event();
    // read-all mode, standard conversion
    cfg.rtps_en = 0; cfg.force_ch63 = 0; cfg.read_all = 1;
    load_cfg();
    run_event();
    $display("refused=%0d skips=%0d acq_during_dig=%0d l1a_pending=%0d sparse=%0d readall=%0d force63=%0d rtps=%0d masked=%0d",
             n_refused, n_skip, n_acq_dig, n_l1a_pending, n_sparse, n_readall, n_force63, n_rtps, n_masked);
    check(n_refused > 0, "L1A refusal seen");
    check(n_skip > 0, "pointer skip seen");
    check(n_acq_dig > 0, "acquisition during digitize seen");
    check(n_l1a_pending > 0, "L1A while sample pending seen");
    check(n_sparse > 0, "sparse readout seen");
    check(n_readall > 0, "read-all readout seen");
    check(n_force63 > 0, "forced channel 63 seen");
    check(n_rtps > 0, "RTPS conversion seen");
    check(n_masked > 0, "channel in reset read out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

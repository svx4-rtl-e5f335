// svx4_top: digital model of the SVX4 128-channel silicon-strip readout chip.
//
// Frontend (clock `fe_clk`, one tick per 132 ns beam sample): the sampled
// preamp outputs `sample` are written every tick into the 46-cell analog
// pipeline under control of the pipeline controller. A level-1 accept
// (`l1a`) takes the cell written `latency` samples earlier out of the ring;
// up to four such cells wait for conversion while writing continues.
//
// Backend (clock `be_clk`, the digitize clock in MODE_DIGITIZE and the byte
// clock in MODE_READOUT): in MODE_DIGITIZE the oldest held cell is
// converted by the Wilkinson ADC. A voltage ramp common to all channels is
// compared with each channel's stored level and a Gray counter, started
// with the ramp (standard mode) or when enough channels have fired (RTPS
// mode), is captured into each channel's register when its comparator
// fires. Channels over the digital threshold (or all channels, or also
// channel 63) are flagged. In MODE_READOUT the flagged channels leave as
// pairs of bytes, address then data, on `dout`, the skip logic passing
// over the others. MODE_INIT shifts the 192-bit configuration in on
// `cfg_din`. Acquisition never stops during digitize or readout.
//
// Ports: `mode` is synchronous to `be_clk`, `l1a` and `sample` to
// `fe_clk`. The configuration outputs are quasi-static and cross to the
// frontend without synchronizers; change them only while no L1A is sent.
// `preamp_reset` and `preamp_risetime` go to the analog preamps, which are
// outside this model, as are the pads; the pipeline cells and the ADC
// comparators are behavioural models.
module svx4_top
  import svx4_pkg::*;
#(
  parameter int LW         = 10,  // stored level width, ramp units
  parameter int RTPS_NCH   = 40,
  parameter int TH_DELAY   = 2,
  parameter int SLOW_DELAY = 4
) (
  input  logic                   fe_clk,
  input  logic                   be_clk,
  input  logic                   rst_n,
  // frontend
  input  logic                   l1a,
  input  logic [NCH-1:0][LW-1:0] sample,
  output logic [NCH-1:0]         preamp_reset,
  output logic [2:0]             preamp_risetime,
  output logic [CELL_BITS-1:0]   wr_cell,
  output logic [CELL_BITS-1:0]   rd_cell,
  output logic                   rd_valid,
  output logic [$clog2(NBUF+1)-1:0] nheld,
  output logic                   l1a_overflow,
  // backend
  input  be_mode_e               mode,
  input  logic                   cfg_din,
  output logic                   cfg_dout,
  output logic                   dig_done,
  output logic [$clog2(NCH+1)-1:0] nflag,
  output logic                   ro_done,
  output logic [7:0]             dout,
  output logic                   dout_valid,
  output logic                   dout_is_addr
);

  cfg_t                   cfg;
  logic [NCELL-1:0]       wr_sel, rd_sel;
  logic [NCH-1:0][LW-1:0] rd_level;
  logic [NCH-1:0]         fast_fire, slow_fire;
  logic                   thresh_fire;
  logic [ADC_BITS-1:0]    cnt_gray;
  logic                   cnt_at_max;
  logic                   cfg_shift, cfg_load;
  logic                   dig_clear, cell_busy, ramp_run, cnt_en, dig_end;
  logic                   addr_load, ro_en, fifo_empty;

  // ---------------- frontend ----------------
  pipeline_ctrl #(.NCELL(NCELL), .NBUF(NBUF), .LAT_BITS(LAT_BITS)) u_pctl (
    .clk          (fe_clk),
    .rst_n        (rst_n),
    .l1a          (l1a),
    .latency      (cfg.latency),
    .cell_busy   (cell_busy),
    .wr_sel       (wr_sel),
    .wr_cell      (wr_cell),
    .rd_sel       (rd_sel),
    .rd_cell      (rd_cell),
    .rd_valid     (rd_valid),
    .nheld        (nheld),
    .l1a_overflow (l1a_overflow)
  );

  pipeline_array #(.NCH(NCH), .NCELL(NCELL), .LW(LW)) u_pipe (
    .clk       (fe_clk),
    .wr_sel    (wr_sel),
    .chan_mask (cfg.chan_mask),
    .sample    (sample),
    .rd_sel    (rd_sel),
    .rd_level  (rd_level)
  );

  // ---------------- backend ----------------
  config_reg u_cfg (
    .clk      (be_clk),
    .rst_n    (rst_n),
    .shift_en (cfg_shift),
    .din      (cfg_din),
    .load     (cfg_load),
    .dout     (cfg_dout),
    .cfg      (cfg)
  );

  io_ctrl u_ioc (
    .clk         (be_clk),
    .rst_n       (rst_n),
    .mode        (mode),
    .rtps_en     (cfg.rtps_en),
    .thresh_fire (thresh_fire),
    .cnt_at_max  (cnt_at_max),
    .fifo_empty  (fifo_empty),
    .cfg_shift   (cfg_shift),
    .cfg_load    (cfg_load),
    .dig_clear   (dig_clear),
    .cell_busy  (cell_busy),
    .ramp_run    (ramp_run),
    .cnt_en      (cnt_en),
    .dig_end     (dig_end),
    .dig_done    (dig_done),
    .addr_load   (addr_load),
    .ro_en       (ro_en),
    .ro_done     (ro_done)
  );

  adc_comparators #(.NCH(NCH), .LW(LW), .RTPS_NCH(RTPS_NCH),
                    .TH_DELAY(TH_DELAY), .SLOW_DELAY(SLOW_DELAY)) u_adc (
    .clk         (be_clk),
    .rst_n       (rst_n),
    .ramp_run    (ramp_run),
    .ramp_trim   (cfg.ramp_trim),
    .level       (rd_level),
    .fast_fire   (fast_fire),
    .slow_fire   (slow_fire),
    .thresh_fire (thresh_fire)
  );

  gray_counter #(.W(ADC_BITS)) u_cnt (
    .clk    (be_clk),
    .rst_n  (rst_n),
    .clear  (dig_clear),
    .en     (cnt_en),
    .gray   (cnt_gray),
    .at_max (cnt_at_max)
  );

  readout_fifo #(.NCHAN(NCH)) u_fifo (
    .clk          (be_clk),
    .rst_n        (rst_n),
    .clear        (dig_clear),
    .dig_run      (ramp_run),
    .dig_end      (dig_end),
    .cnt_gray     (cnt_gray),
    .slow_fire    (slow_fire),
    .threshold    (cfg.threshold),
    .read_all     (cfg.read_all),
    .force_ch63   (cfg.force_ch63),
    .addr_load    (addr_load),
    .ro_en        (ro_en),
    .dout         (dout),
    .dout_valid   (dout_valid),
    .dout_is_addr (dout_is_addr),
    .empty        (fifo_empty),
    .nflag        (nflag)
  );

  assign preamp_reset    = cfg.chan_mask;
  assign preamp_risetime = cfg.risetime;

endmodule

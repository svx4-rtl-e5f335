// pipeline_array: behavioural model of the 128 x 46 analog pipeline.
//
// This is a behavioural model, not synthesizable chip logic: in silicon each
// cell is a MiM capacitor between a write switch (W1..W46) and a read switch
// (R1..R46) shared with a write and a read amplifier per channel. Here a
// stored voltage is an unsigned number in units of one ADC ramp step, which
// is how the rest of this design sees it. On every frontend clock the
// sample of each channel is written into the cell picked by the one-hot
// `wr_sel`; the cell picked by the one-hot `rd_sel` drives `rd_level`
// continuously, so that reading and writing can go on at the same time
// (the write and read amplifiers are separate). The correlated double
// sampling of the real cell is folded into the sample value. Channels whose
// preamp is held in reset (`chan_mask`) store zero, the baseline.
module pipeline_array #(
  parameter int NCH   = 128,
  parameter int NCELL = 46,
  parameter int LW    = 10
) (
  input  logic                clk,
  input  logic [NCELL-1:0]    wr_sel,
  input  logic [NCH-1:0]      chan_mask,
  input  logic [NCH-1:0][LW-1:0] sample,
  input  logic [NCELL-1:0]    rd_sel,
  output logic [NCH-1:0][LW-1:0] rd_level
);

  logic [NCH-1:0][LW-1:0] store [NCELL];


  logic [NCH-1:0][LW-1:0] masked;
  logic [$clog2(NCELL)-1:0] wr_idx, rd_idx;
  logic                    wr_any;

  always_comb begin
    for (int ch = 0; ch < NCH; ch++) masked[ch] = chan_mask[ch] ? '0 : sample[ch];
    wr_idx = '0;
    rd_idx = '0;
    for (int c = 0; c < NCELL; c++) begin
      if (wr_sel[c]) wr_idx = ($clog2(NCELL))'(c);
      if (rd_sel[c]) rd_idx = ($clog2(NCELL))'(c);
    end
    wr_any = |wr_sel;
  end

  always_ff @(posedge clk) begin
    if (wr_any) store[wr_idx] <= masked;
  end

  assign rd_level = (|rd_sel) ? store[rd_idx] : '0;

endmodule

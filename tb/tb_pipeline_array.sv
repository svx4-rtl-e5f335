// tb_pipeline_array: writes random samples into the pipeline model through
// one-hot write selects, reads them back through one-hot read selects while
// writing continues elsewhere, and checks that channels held in reset store
// the baseline (zero).
module tb_pipeline_array;
  localparam int NCH = 128, NCELL = 46, LW = 10;
  logic clk = 0;
  logic [NCELL-1:0] wr_sel = '0, rd_sel = '0;
  logic [NCH-1:0] chan_mask = '0;
  logic [NCH-1:0][LW-1:0] sample, rd_level;
  logic [NCH-1:0][LW-1:0] model [NCELL];
  int checks = 0, failures = 0;

  pipeline_array dut (.clk, .wr_sel, .chan_mask, .sample, .rd_sel, .rd_level);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ch = 0; ch < NCH; ch++) chan_mask[ch] = (ch % 17 == 5);
    // fill every cell
    for (int c = 0; c < NCELL; c++) begin
      for (int ch = 0; ch < NCH; ch++) sample[ch] = LW'($urandom);
      wr_sel = '0; wr_sel[c] = 1'b1;
      for (int ch = 0; ch < NCH; ch++) model[c][ch] = chan_mask[ch] ? '0 : sample[ch];
      @(negedge clk);
    end
    // read each cell while writing a different one
    for (int r = 0; r < 3 * NCELL; r++) begin
      int rc, wc;
      rc = $urandom_range(0, NCELL - 1);
      wc = (rc + $urandom_range(1, NCELL - 1)) % NCELL;
      rd_sel = '0; rd_sel[rc] = 1'b1;
      wr_sel = '0; wr_sel[wc] = 1'b1;
      for (int ch = 0; ch < NCH; ch++) sample[ch] = LW'($urandom);
      #1;
      checks++;
      if (rd_level != model[rc]) begin failures++; $display("FAIL read cell %0d", rc); end
      for (int ch = 0; ch < NCH; ch++) model[wc][ch] = chan_mask[ch] ? '0 : sample[ch];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

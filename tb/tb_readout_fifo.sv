// tb_readout_fifo: full 128-channel readout array. Each round gives every
// channel a random firing time of its delay comparator (some never fire),
// runs a Gray counter alongside, then reads out and compares the byte
// stream with the expected list of flagged channels: address byte then
// data byte, lowest channel first, one byte per clock, 2n bytes for n hit
// channels. Rounds cover sparse mode, read-all mode, the forced channel 63,
// a channel-127-only hit and an empty event.
module tb_readout_fifo;
  import svx4_pkg::*;
  localparam int N = 128;
  logic clk = 0, rst_n = 0, clear = 0, dig_run = 0, dig_end = 0;
  logic [7:0] cnt_gray = '0, threshold = '0;
  logic [N-1:0] slow_fire = '0;
  logic read_all = 0, force_ch63 = 0, addr_load = 0, ro_en = 0;
  logic [7:0] dout;
  logic dout_valid, dout_is_addr, empty;
  logic [7:0] nflag;
  int checks = 0, failures = 0;
  int n_sparse = 0, n_all = 0, n_force = 0;

  readout_fifo #(.NCHAN(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tf [N];
    int val [N];
    int exp_b[$];
    int got_b[$];
    int nvalid, first, last;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rnd = 0; rnd < 12; rnd++) begin
      read_all   = (rnd % 4 == 1);
      force_ch63 = (rnd % 3 == 2);
      threshold  = 8'($urandom_range(20, 240));
      for (int ch = 0; ch < N; ch++) tf[ch] = $urandom_range(0, 320);  // > 255: never fires
      if (rnd == 3) begin threshold = 8'd100; for (int ch = 0; ch < N; ch++) tf[ch] = 10; tf[127] = 200; end
      if (rnd == 4) begin threshold = 8'd255; for (int ch = 0; ch < N; ch++) tf[ch] = 10; force_ch63 = 0; read_all = 0; end
      // digitize: counter value at clock t is t, saturating at 255
      clear = 1; @(negedge clk); clear = 0;
      dig_run = 1;
      for (int t = 0; t <= 255; t++) begin
        cnt_gray = 8'(t ^ (t >> 1));
        for (int ch = 0; ch < N; ch++) slow_fire[ch] = (t >= tf[ch]);
        dig_end = (t == 255);
        @(negedge clk);
      end
      dig_run = 0; dig_end = 0; slow_fire = '0;
      exp_b = {};
      for (int ch = 0; ch < N; ch++) begin
        val[ch] = (tf[ch] > 255) ? 255 : tf[ch];
        if (read_all || val[ch] >= int'(threshold) || (force_ch63 && ch == 63)) begin
          exp_b.push_back(ch); exp_b.push_back(val[ch]);
        end
      end
      check(int'(nflag) == exp_b.size() / 2, "flag count");
      if (read_all) n_all++; else n_sparse++;
      if (force_ch63 && !read_all && val[63] < int'(threshold)) n_force++;
      // readout
      addr_load = 1; @(negedge clk); addr_load = 0;
      ro_en = 1;
      got_b = {}; nvalid = 0; first = -1; last = -1;
      for (int t = 0; t < 2 * N + 8; t++) begin
        @(negedge clk);
        if (dout_valid) begin
          got_b.push_back(int'(dout));
          check(dout_is_addr == (got_b.size() % 2 == 1), "address/data alternate");
          if (first < 0) first = t;
          last = t;
        end
      end
      ro_en = 0;
      check(got_b == exp_b, $sformatf("byte stream round %0d (%0d vs %0d bytes)", rnd, got_b.size(), exp_b.size()));
      if (exp_b.size() > 0)
        check(first == 0 && last - first + 1 == exp_b.size(), "one byte per clock, no gaps");
      check(empty, "empty after readout");
      @(negedge clk);
    end
    check(n_sparse > 0 && n_all > 0 && n_force > 0, "modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

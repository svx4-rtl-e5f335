// tb_pipeline_ctrl: runs random level-1 accepts and digitize cycles
// through the pipeline controller and compares every clock with a
// reference model built on queues: the written cell, that held cells are
// never written, which cell an L1A takes (the one written `latency`
// samples earlier), the trigger-ordered read cell, release on the fall of
// the digitize flag (after the two-flop synchronizer), and that a fifth
// L1A is refused without disturbing the four held cells.
module tb_pipeline_ctrl;
  localparam int NCELL = 46, NBUF = 4;
  logic clk = 0, rst_n = 0, l1a = 0, cell_busy = 0;
  logic [5:0] latency = 6'd10;
  logic [NCELL-1:0] wr_sel, rd_sel;
  logic [5:0] wr_cell, rd_cell;
  logic rd_valid, l1a_overflow;
  logic [2:0] nheld;
  int checks = 0, failures = 0;
  int n_over = 0, n_take = 0, n_release = 0, n_skip = 0;

  pipeline_ctrl dut (.clk, .rst_n, .l1a, .latency, .cell_busy, .wr_sel, .wr_cell,
                     .rd_sel, .rd_cell, .rd_valid, .nheld, .l1a_overflow);

  always #5 clk = ~clk;

  // reference model
  int m_wp = 0;
  bit m_marked [NCELL];
  int m_q[$];
  int m_hist[$];          // m_hist[0] = cell written one sample ago
  bit m_s0 = 0, m_s1 = 0, m_s2 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare before each edge, then advance the model with the same inputs.
  always @(posedge clk) if (rst_n) begin
    bit rel, take, over;
    int tc, nxt;
    check(wr_cell == 6'(m_wp) && wr_sel == (46'd1 << m_wp), "write pointer");
    check(!m_marked[m_wp], "write to held cell");
    check(rd_valid == (m_q.size() > 0), "rd_valid");
    check(int'(nheld) == m_q.size(), "nheld");
    if (m_q.size() > 0) check(rd_cell == 6'(m_q[0]) && rd_sel == (46'd1 << m_q[0]), "read cell");
    rel  = m_s2 && !m_s1 && m_q.size() > 0;
    take = 0; over = 0; tc = 0;
    if (l1a && latency >= 1 && latency <= NCELL - NBUF - 1 && m_hist.size() >= int'(latency)) begin
      tc = m_hist[latency - 1];
      if (m_q.size() == NBUF && !rel) over = 1; else take = 1;
    end
    check(l1a_overflow == over, "overflow flag");
    if (over) n_over++;
    if (rel) begin m_marked[m_q[0]] = 0; void'(m_q.pop_front()); n_release++; end
    if (take) begin m_marked[tc] = 1; m_q.push_back(tc); n_take++; end
    m_hist.push_front(m_wp);
    if (m_hist.size() > NCELL) void'(m_hist.pop_back());
    nxt = (m_wp + 1) % NCELL;
    while (m_marked[nxt]) begin nxt = (nxt + 1) % NCELL; n_skip++; end
    m_wp = nxt;
    m_s2 = m_s1; m_s1 = m_s0; m_s0 = cell_busy;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // burst of six L1As: four taken, two refused
    repeat (60) @(negedge clk);
    for (int i = 0; i < 6; i++) begin l1a = 1; @(negedge clk); l1a = 0; repeat (3) @(negedge clk); end
    repeat (100) @(negedge clk);   // held cells survive two trips round the ring
    // digitize them one by one
    for (int i = 0; i < 4; i++) begin
      cell_busy = 1; repeat (7) @(negedge clk); cell_busy = 0; repeat (6) @(negedge clk);
    end
    // random traffic with changing latency
    for (int i = 0; i < 4000; i++) begin
      if (i % 500 == 0) latency = 6'($urandom_range(1, 41));
      l1a = ($urandom_range(0, 9) == 0);
      if ($urandom_range(0, 14) == 0) cell_busy = ~cell_busy;
      @(negedge clk);
    end
    l1a = 0;
    repeat (10) @(negedge clk);
    check(n_over > 0 && n_take > 4 && n_release > 4 && n_skip > 0, "all mechanisms exercised");
    $display("takes=%0d releases=%0d refused=%0d skips=%0d", n_take, n_release, n_over, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

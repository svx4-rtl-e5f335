// tb_skip_cell: a chain of eight skip cells (channels 120..127) with random
// flags. Checks that an unflagged cell passes the word from above, a
// flagged one shows its own word, and that alternate address-bank and
// data-bank shifts deliver the flagged channels' addresses and data lowest
// channel first, the data of a channel waiting for its own shift, followed
// by an empty word.
module tb_skip_cell;
  import svx4_pkg::*;
  localparam int N = 8, BASE = 120;
  logic clk = 0, rst_n = 0, clear = 0, addr_load = 0, shift_addr = 0, shift_data = 0;
  logic [N-1:0] lat_en = '0, lat_flag = '0, flag;
  logic [7:0] lat_gray;
  ro_word_t chain [N+1];
  int checks = 0, failures = 0;

  assign chain[N] = '0;
  for (genvar i = 0; i < N; i++) begin : g
    skip_cell #(.CH(BASE + i)) dut (.clk, .rst_n, .clear, .lat_en(lat_en[i]), .lat_gray,
      .lat_flag(lat_flag[i]), .addr_load, .shift_addr, .shift_data, .chain_in(chain[i+1]), .chain_out(chain[i]),
      .flag(flag[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] val [N];
    logic [N-1:0] fl;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rnd = 0; rnd < 40; rnd++) begin
      int exp_q[$];
      exp_q = {};
      clear = 1; @(negedge clk); clear = 0;
      fl = (rnd == 0) ? 8'h80 : (rnd == 1) ? 8'h00 : 8'($urandom);
      // latch each cell at its own time with its own counter value
      for (int i = 0; i < N; i++) begin
        val[i] = 8'($urandom);
        lat_gray = val[i]; lat_en = '0; lat_en[i] = 1'b1; lat_flag = fl;
        @(negedge clk);
      end
      lat_en = '0;
      check(flag == fl, "flags captured");
      addr_load = 1; @(negedge clk); addr_load = 0;
      // bypass: an unflagged cell shows what arrives from above
      for (int i = 0; i < N; i++)
        check(fl[i] ? (chain[i] == {1'b1, 7'(BASE + i), val[i]}) : (chain[i] == chain[i+1]),
              $sformatf("mux of cell %0d", i));
      for (int i = 0; i < N; i++) if (fl[i]) exp_q.push_back(i);
      foreach (exp_q[k]) begin
        check(chain[0] == {1'b1, 7'(BASE + exp_q[k]), val[exp_q[k]]},
              $sformatf("word %0d of round %0d", k, rnd));
        // address bank first: the data of this channel stays at the end
        shift_addr = 1; @(negedge clk); shift_addr = 0;
        check(chain[0].data == val[exp_q[k]], "data waits for its phase");
        if (k + 1 < exp_q.size())
          check(chain[0].valid && chain[0].addr == 7'(BASE + exp_q[k+1]), "next address after address shift");
        shift_data = 1; @(negedge clk); shift_data = 0;
      end
      check(!chain[0].valid, "empty after last word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

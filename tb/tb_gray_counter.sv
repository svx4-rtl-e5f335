// tb_gray_counter: checks the Wilkinson Gray counter against a binary
// reference count: Gray encoding, one bit changing per step, saturation at
// full scale, synchronous clear, and that 255 enabled clocks reach full
// scale (one count per clock).
module tb_gray_counter;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [7:0] gray, prev;
  logic at_max;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  gray_counter #(.W(8)) dut (.clk, .rst_n, .clear, .en, .gray, .at_max);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rnd = 0; rnd < 3; rnd++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0; ref_cnt = 0;
      check(gray == 0 && !at_max, "clear");
      for (int i = 0; i < 400; i++) begin
        en = (rnd == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        prev = gray;
        @(negedge clk);
        if (en && ref_cnt < 255) ref_cnt++;
        check(gray == 8'(ref_cnt ^ (ref_cnt >> 1)), $sformatf("gray %h ref %0d", gray, ref_cnt));
        check($countones(gray ^ prev) <= 1, "single bit change");
        check(at_max == (ref_cnt == 255), "at_max");
        if (rnd == 0 && i == 254) check(at_max, "full scale after 255 clocks");
      end
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

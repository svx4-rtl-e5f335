// gray_counter: the Wilkinson ADC counter of the backend.
//
// The counter runs while `en` is high, one count per clock, and is
// distributed to every channel register, which captures it when that
// channel's comparator fires. It is kept in Gray code so that a value
// captured at any instant is off by at most one count: only one bit changes
// per step. The chip description names a Gray counter in the backend and an
// 8-bit ADC; that the counter stops at its last code instead of wrapping is
// this design's choice, so that a channel whose comparator never fires reads
// full scale.
//
// Interface: `clear` (synchronous) returns the counter to zero, `en` counts.
// `gray` is the registered Gray-coded value,
// `at_max` is high once the last code is reached. Outputs change one clock
// after `en`.
module gray_counter #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] gray,
  output logic         at_max
);

  logic [W-1:0] bin_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q <= '0;
      gray  <= '0;
    end else if (clear) begin
      bin_q <= '0;
      gray  <= '0;
    end else if (en && !at_max) begin
      bin_q <= bin_q + 1'b1;
      gray  <= (bin_q + 1'b1) ^ ((bin_q + 1'b1) >> 1);
    end
  end

  assign at_max = &bin_q;

endmodule

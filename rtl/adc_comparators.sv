// adc_comparators: behavioural model of the analog part of the Wilkinson ADC.
//
// This is a behavioural model of analog circuits (ramp generator, channel
// discriminators, RTPS summing capacitor and threshold discriminator, delay
// comparators), written clock by clock so it can sit in a digital
// simulation. Voltages are unsigned numbers in ramp units.
//
// While `ramp_run` is high the ramp rises by (ramp_trim + 1) units per
// clock, starting from zero; the trim stands for the configuration bits that
// switch capacitors in the ramp generator. The fast channel discriminator of
// a channel fires once the ramp reaches the stored level and stays fired
// until the ramp is reset. The RTPS threshold discriminator fires
// TH_DELAY clocks after at least RTPS_NCH channels have fired (the summing
// capacitor voltage crossing V_thresh). The slow delay comparator repeats
// the channel discriminator output SLOW_DELAY clocks later; its output is
// what latches the counter into the channel's register. The delay
// comparator must be slower than the threshold discriminator, so
// SLOW_DELAY > TH_DELAY; this is asserted.
//
// The structure and the ordering of the delays follow the chip description;
// the value 40 for RTPS_NCH is its example. The delays in clocks are this
// model's own numbers.
module adc_comparators #(
  parameter int NCH        = 128,
  parameter int LW         = 10,
  parameter int RTPS_NCH   = 40,
  parameter int TH_DELAY   = 2,
  parameter int SLOW_DELAY = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ramp_run,
  input  logic [2:0]             ramp_trim,
  input  logic [NCH-1:0][LW-1:0] level,
  output logic [NCH-1:0]         fast_fire,
  output logic [NCH-1:0]         slow_fire,
  output logic                   thresh_fire
);

  localparam int RW = LW + 2;

  logic [RW-1:0]  ramp;
  logic [NCH-1:0] slow_pipe [SLOW_DELAY];
  logic [TH_DELAY-1:0] th_pipe;
  logic           sum_over;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp <= '0;
    end else if (!ramp_run) begin
      ramp <= '0;
    end else if (ramp < {1'b0, {(RW-1){1'b1}}}) begin
      ramp <= ramp + RW'(ramp_trim) + 1'b1;
    end
  end

  always_comb begin
    for (int ch = 0; ch < NCH; ch++)
      fast_fire[ch] = ramp_run && (ramp >= RW'(level[ch]));
    sum_over = ($countones(fast_fire) >= RTPS_NCH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th_pipe <= '0;
      for (int i = 0; i < SLOW_DELAY; i++) slow_pipe[i] <= '0;
    end else begin
      th_pipe <= {th_pipe[TH_DELAY-2:0], sum_over && ramp_run};
      slow_pipe[0] <= fast_fire;
      for (int i = 1; i < SLOW_DELAY; i++) slow_pipe[i] <= slow_pipe[i-1] & {NCH{ramp_run}};
    end
  end

  assign thresh_fire = th_pipe[TH_DELAY-1] && ramp_run;
  assign slow_fire   = slow_pipe[SLOW_DELAY-1] & {NCH{ramp_run}};

  initial begin
    assert (SLOW_DELAY > TH_DELAY && TH_DELAY >= 2)
      else $error("delay comparator must be slower than the threshold discriminator");
  end

endmodule

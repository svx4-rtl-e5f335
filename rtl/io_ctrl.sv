// io_ctrl: backend sequencer for configuration, digitize and readout.
//
// The backend mode (`mode`, synchronous to the backend clock) is set from
// outside. In MODE_INIT the configuration register shifts one bit per clock
// and is committed to its shadow register when the mode is left. Entering
// MODE_DIGITIZE clears the readout array and the counter for one clock,
// then starts the ADC ramp. The Wilkinson counter starts with the ramp in
// standard mode; in RTPS mode it waits for the threshold discriminator,
// so the common-mode level of the sample is subtracted from all channels.
// Conversion ends when the counter reaches full scale, or after
// 2^TW ramp clocks (1024 by default) if the counter never started; `dig_end` then
// makes channels that never fired capture the counter. `dig_done` stays
// high until the mode changes. `cell_busy` tells the pipeline controller
// that the held cell at the head of its queue is in use: it rises when a
// conversion starts and falls when the readout of that conversion is
// complete, and its fall releases the cell back into the ring.
// Entering MODE_READOUT presets the channel addresses for one clock, then
// enables the byte stream until the readout array is empty; `ro_done`
// stays high until the mode changes. The pipeline keeps acquiring during
// both, independent of this block.
//
// The modes, the two ADC start modes and the end of readout on the last hit
// channel follow the chip description. The mode encoding, the single-clock
// clear and address preset and the time-out are this design's choices.
module io_ctrl
  import svx4_pkg::*;
#(
  parameter int TW = ADC_BITS + 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  be_mode_e mode,
  input  logic     rtps_en,
  input  logic     thresh_fire,
  input  logic     cnt_at_max,
  input  logic     fifo_empty,
  output logic     cfg_shift,
  output logic     cfg_load,
  output logic     dig_clear,
  output logic     cell_busy,
  output logic     ramp_run,
  output logic     cnt_en,
  output logic     dig_end,
  output logic     dig_done,
  output logic     addr_load,
  output logic     ro_en,
  output logic     ro_done
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_DIG, S_DIG_DONE, S_RO_LOAD, S_RO_RUN, S_RO_DONE
  } state_e;

  state_e   state, state_n;
  be_mode_e mode_q;
  logic     started;
  logic [TW-1:0] timer;
  logic     timeout;
  logic     busy_q;

  assign timeout = (timer == {TW{1'b1}});

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:     if (mode == MODE_DIGITIZE)     state_n = S_CLEAR;
                  else if (mode == MODE_READOUT) state_n = S_RO_LOAD;
      S_CLEAR:    state_n = S_DIG;
      S_DIG:      if (cnt_at_max || timeout)     state_n = S_DIG_DONE;
      S_DIG_DONE: if (mode != MODE_DIGITIZE)     state_n = S_IDLE;
      S_RO_LOAD:  state_n = S_RO_RUN;
      S_RO_RUN:   if (fifo_empty)                state_n = S_RO_DONE;
      S_RO_DONE:  if (mode != MODE_READOUT)      state_n = S_IDLE;
      default:    state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      mode_q  <= MODE_ACQUIRE;
      started <= 1'b0;
      timer   <= '0;
      busy_q  <= 1'b0;
    end else begin
      if (state_n == S_CLEAR)        busy_q <= 1'b1;
      else if (state_n == S_RO_DONE) busy_q <= 1'b0;
      state   <= state_n;
      mode_q  <= mode;
      started <= (state == S_DIG) && (started || thresh_fire);
      timer   <= (state == S_DIG) ? timer + 1'b1 : '0;
    end
  end

  assign cfg_shift  = (state == S_IDLE) && (mode == MODE_INIT);
  assign cfg_load   = (mode_q == MODE_INIT) && (mode != MODE_INIT);
  assign dig_clear  = (state == S_CLEAR);
  assign cell_busy  = busy_q;
  assign ramp_run   = (state == S_DIG);
  assign cnt_en     = (state == S_DIG) && (!rtps_en || started || thresh_fire);
  assign dig_end    = (state == S_DIG) && (cnt_at_max || timeout);
  assign dig_done   = (state == S_DIG_DONE);
  assign addr_load  = (state == S_RO_LOAD);
  assign ro_en      = (state == S_RO_RUN);
  assign ro_done    = (state == S_RO_DONE);

endmodule

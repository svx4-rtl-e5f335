// readout_fifo: the 128 x 15 register array into which conversions are
// captured and from which hit channels are read out, with sparsification.
//
// Digitize: `clear` empties every slot. While `dig_run` is high, a channel
// whose delay comparator output (`slow_fire`) rises for the first time
// captures the Gray-coded counter `cnt_gray`. At the same moment it is
// decided whether the channel is flagged for readout: when read-all mode is
// set, when the counter value reaches the digital threshold, or, if the
// option is set, because it is channel 63. All channels that fire in one
// clock see the same counter value, so one comparator serves them all.
// `dig_end` makes every channel that has not fired capture the counter as
// it stands (full scale when the counter has stopped).
//
// Readout: `addr_load` presets each slot's address to its channel number.
// While `ro_en` is high the array emits one byte per clock, alternating the
// address byte (7-bit address, MSB zero) and the data byte (counter value
// converted to binary) of the lowest flagged channel left. The address
// bank shifts after the address byte and the data bank after the data
// byte, as the two banks of the chip shift on opposite phases of a
// half-rate readout clock. Unflagged channels are passed over by the skip
// logic. `dout`, `dout_valid` and `dout_is_addr` are registered, one clock
// after the slot is looked at. `empty` is high when no flagged word is
// left and no data byte is pending. `nflag` counts flagged channels.
//
// The array size, the address/data split, the threshold decision at latch
// time, the channel-63 option and the skip logic follow the chip
// description. Gray-to-binary conversion at the output, the byte format of
// the address and the full-scale value for channels that never fire are
// this design's choices.
module readout_fifo
  import svx4_pkg::*;
#(
  parameter int NCHAN = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  // digitize
  input  logic                clear,
  input  logic                dig_run,
  input  logic                dig_end,
  input  logic [ADC_BITS-1:0] cnt_gray,
  input  logic [NCHAN-1:0]      slow_fire,
  input  logic [ADC_BITS-1:0] threshold,
  input  logic                read_all,
  input  logic                force_ch63,
  // readout
  input  logic                addr_load,
  input  logic                ro_en,
  output logic [7:0]          dout,
  output logic                dout_valid,
  output logic                dout_is_addr,
  output logic                empty,
  output logic [$clog2(NCHAN+1)-1:0] nflag
);

  logic [NCHAN-1:0] done;
  logic [NCHAN-1:0] lat_en;
  logic [NCHAN-1:0] lat_flag;
  logic [NCHAN-1:0] flag;
  logic           over_thr;
  logic           phase;       // 0: address byte, 1: data byte
  logic           shift_addr, shift_data;
  logic           pend;        // address sent, its data byte not yet
  ro_word_t       chain [NCHAN+1];  // chain[i] enters cell i from above
  ro_word_t       tail;

  assign over_thr = gray2bin(cnt_gray) >= threshold;

  always_comb begin
    for (int ch = 0; ch < NCHAN; ch++) begin
      lat_en[ch]   = !done[ch] && ((dig_run && slow_fire[ch]) || dig_end);
      lat_flag[ch] = read_all || over_thr || (force_ch63 && ch == 63);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     done <= '0;
    else if (clear) done <= '0;
    else            done <= done | lat_en;
  end

  assign chain[NCHAN] = '0;

  for (genvar ch = 0; ch < NCHAN; ch++) begin : g_cell
    skip_cell #(.CH(ch)) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (clear),
      .lat_en    (lat_en[ch]),
      .lat_gray  (cnt_gray),
      .lat_flag  (lat_flag[ch]),
      .addr_load (addr_load),
      .shift_addr(shift_addr),
      .shift_data(shift_data),
      .chain_in  (chain[ch+1]),
      .chain_out (chain[ch]),
      .flag      (flag[ch])
    );
  end

  assign tail  = chain[0];
  assign empty      = !tail.valid && !pend;
  assign shift_addr = ro_en && !phase && tail.valid;
  assign shift_data = ro_en && phase && pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= 1'b0;
      pend         <= 1'b0;
      dout         <= '0;
      dout_valid   <= 1'b0;
      dout_is_addr <= 1'b0;
    end else if (!ro_en) begin
      phase        <= 1'b0;
      pend         <= 1'b0;
      dout_valid   <= 1'b0;
    end else begin
      phase        <= !phase;
      dout_is_addr <= !phase;
      if (!phase) begin
        dout_valid <= tail.valid;
        dout       <= {1'b0, tail.addr};
        pend       <= tail.valid;
      end else begin
        dout_valid <= pend;
        dout       <= gray2bin(tail.data);
        pend       <= 1'b0;
      end
    end
  end

  always_comb begin
    nflag = '0;
    for (int ch = 0; ch < NCHAN; ch++) nflag += flag[ch];
  end

endmodule

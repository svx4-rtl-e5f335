// skip_cell: one channel slot of the sparsifying readout register.
//
// Each channel owns an 8-bit data register, a 7-bit address register and a
// readout flag. During digitize the data register captures the Gray-coded
// counter when `lat_en` is pulsed (the channel's comparator fired) and the
// flag captures `lat_flag`, the threshold/mode decision made at the same
// moment. At the start of readout `addr_load` presets the address register
// to the channel number CH and marks the word valid if the channel is
// flagged.
//
// During readout the cells form a chain from channel 127 down to channel 0.
// The bypass multiplexer of a flagged cell passes its own word down the
// chain; an unflagged cell passes the word arriving from above, so it
// drops out of the shift register. The address bank (address and valid
// bit) and the data bank shift separately: on `shift_addr` a flagged cell
// loads the address arriving from above, on `shift_data` the data. Driven
// on alternate phases, the address of a channel leaves first and its data
// follows. The chain is thus a shift register over the flagged channels
// only, and its end (channel 0 side) shows the lowest flagged channel not
// yet read. When the topmost flagged word has moved down, an empty
// (valid = 0) address follows it, which marks the end of the data.
//
// Structure (register, bypass multiplexer, flag, separate address and data
// banks shifted alternately) follows the skip logic cell of the chip. The
// valid bit travelling with the address is this design's own way of
// marking the end of the data.
module skip_cell
  import svx4_pkg::*;
#(
  parameter int CH = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                lat_en,
  input  logic [ADC_BITS-1:0] lat_gray,
  input  logic                lat_flag,
  input  logic                addr_load,
  input  logic                shift_addr,
  input  logic                shift_data,
  input  ro_word_t            chain_in,
  output ro_word_t            chain_out,
  output logic                flag
);

  ro_word_t word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      flag <= 1'b0;
    end else if (clear) begin
      word <= '0;
      flag <= 1'b0;
    end else if (lat_en) begin
      word.data <= lat_gray;
      flag      <= lat_flag;
    end else if (addr_load) begin
      word.addr  <= ADDR_BITS'(CH);
      word.valid <= flag;
    end else if (flag) begin
      if (shift_addr) begin
        word.valid <= chain_in.valid;
        word.addr  <= chain_in.addr;
      end
      if (shift_data) word.data <= chain_in.data;
    end
  end

  assign chain_out = flag ? word : chain_in;

endmodule

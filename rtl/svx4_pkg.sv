// svx4_pkg: constants and types shared by the SVX4 readout chip.
//
// The chip reads out 128 silicon-strip channels. Each channel has a 46-cell
// analog pipeline that can hold up to 4 triggered samples, an 8-bit
// Wilkinson ADC, and a 15-bit slot (8-bit data, 7-bit address) in the
// readout register array. These sizes come from the chip description.
//
// The layout of the 192-bit configuration register is this design's own
// choice: the description gives its length and says it programs the
// black-hole (preamp reset) feature, the preamp risetime, the ramp slope,
// the digital threshold, the sparsification mode, the forced readout of
// channel 63 and the RTPS mode, but not the bit positions. Bits not used
// here are kept as reserved.
package svx4_pkg;

  localparam int NCH       = 128;  // channels per chip
  localparam int NCELL     = 46;   // pipeline cells per channel
  localparam int NBUF      = 4;    // triggered cells held at once
  localparam int ADC_BITS  = 8;    // Wilkinson counter width
  localparam int ADDR_BITS = 7;    // channel address width
  localparam int CFG_BITS  = 192;  // configuration register length
  localparam int LAT_BITS  = 6;    // pipeline latency field width
  localparam int CELL_BITS = 6;    // pipeline cell index width

  // Backend operating mode, applied from outside on the backend clock.
  typedef enum logic [1:0] {
    MODE_ACQUIRE  = 2'd0,  // backend idle, frontend acquires
    MODE_DIGITIZE = 2'd1,  // convert the oldest triggered cell
    MODE_READOUT  = 2'd2,  // shift out flagged channels
    MODE_INIT     = 2'd3   // shift the configuration register
  } be_mode_e;

  // Configuration register fields, MSB first. Total 192 bits.
  typedef struct packed {
    logic [40:0]          reserved;    // [191:151]
    logic [2:0]           risetime;    // [150:148] preamp risetime select
    logic [2:0]           ramp_trim;   // [147:145] ADC ramp slope select
    logic [LAT_BITS-1:0]  latency;     // [144:139] L1A latency in samples
    logic                 rtps_en;     // [138] real-time pedestal subtraction
    logic                 force_ch63;  // [137] always read channel 63
    logic                 read_all;    // [136] sparsification off
    logic [ADC_BITS-1:0]  threshold;   // [135:128] digital threshold
    logic [NCH-1:0]       chan_mask;   // [127:0] 1 = hold preamp in reset
  } cfg_t;

  // One word of the sparsifying readout shift register.
  typedef struct packed {
    logic                 valid;
    logic [ADDR_BITS-1:0] addr;
    logic [ADC_BITS-1:0]  data;
  } ro_word_t;

  function automatic logic [ADC_BITS-1:0] gray2bin(input logic [ADC_BITS-1:0] g);
    logic [ADC_BITS-1:0] b;
    b[ADC_BITS-1] = g[ADC_BITS-1];
    for (int i = ADC_BITS - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic logic [ADC_BITS-1:0] bin2gray(input logic [ADC_BITS-1:0] b);
    return b ^ (b >> 1);
  endfunction

endpackage

// config_reg: the 192-bit configuration register.
//
// A plain D flip-flop shift register takes the configuration serially, one
// bit per clock while `shift_en` is high; bits enter at the top (bit 191)
// and move towards bit 0, so the first bit sent ends in bit 0 after 192
// clocks. The bit leaving bit 0 appears on `dout`, which lets several chips
// be chained. A `load` pulse copies the shift register into the shadow
// register, whose outputs `cfg` control the chip; shifting therefore never
// disturbs the running configuration. The chip builds the shadow register
// from SEU-hardened (DICE) latch cells; here it is an ordinary register,
// since radiation hardening is a property of the cell layout, not of the
// logic. Reset clears both registers.
//
// Length, shift-register-plus-shadow structure: chip description. Bit
// order, `load` strobe and reset values: this design's choices. Field
// layout: see svx4_pkg::cfg_t.
module config_reg
  import svx4_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,
  input  logic din,
  input  logic load,
  output logic dout,
  output cfg_t cfg
);

  logic [CFG_BITS-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr <= '0;
    else if (shift_en) sr <= {din, sr[CFG_BITS-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cfg <= '0;
    else if (load) cfg <= cfg_t'(sr);
  end

  assign dout = sr[0];

endmodule

// Conditional increment of an 8-bit word: z = b + sel (mod 256), built
// from two 4-bit binary-to-excess-one converters (BECs) and two 8:4 muxes.
//
// How it works: the low BEC forms b[3:0] + 1 and the low mux passes it
// when sel is one. The high BEC forms b[7:4] + 1 in parallel; its mux
// passes it only when the low nibble overflows, that is when sel is one
// and b[3:0] is all ones. The all-ones condition is the end of the low
// BEC's own AND chain (B0 & B1 & B2 & B3), so no separate detector is
// needed. Splitting one 8-bit BEC and a 16:8 mux into two 4-bit halves
// this way shortens the longest AND chain from seven gates to three.
//
// Interface: b is the word to increment, sel the increment request, z the
// result. An increment of 255 wraps to 0; in the multiplier the operands
// guarantee this never happens.
// Timing: purely combinational.
//
// The two-BEC, two-mux arrangement and the use of the low AND chain as
// the high select follow the published design. The extra AND of that
// chain with sel is this implementation's: without it the high nibble
// would be incremented whenever b[3:0] is all ones, even with sel = 0.
module bec_mux8 (
  input  logic [7:0] b,
  input  logic       sel,
  output logic [7:0] z
);

  logic [3:0] inc_lo, inc_hi;
  logic       lo_all_ones;
  logic       sel_hi;

  bec #(.N(4)) u_bec_lo (.b(b[3:0]), .x(inc_lo), .ovf(lo_all_ones));
  bec #(.N(4)) u_bec_hi (.b(b[7:4]), .x(inc_hi), .ovf());

  always_comb sel_hi = sel & lo_all_ones;

  mux_8to4 #(.W(4)) u_mux_lo (.sel(sel),    .d0(b[3:0]), .d1(inc_lo), .y(z[3:0]));
  mux_8to4 #(.W(4)) u_mux_hi (.sel(sel_hi), .d0(b[7:4]), .d1(inc_hi), .y(z[7:4]));

endmodule

// 8:4 multiplexer: selects one of two 4-bit words.
//
// How it works: y = sel ? d1 : d0. In the top-byte increment of the
// multiplier d0 is a nibble of the high half product and d1 the same
// nibble after a 4-bit binary-to-excess-one converter.
//
// Interface: sel, d0, d1 in, y out (W bits, 4 by default).
// Timing: purely combinational.
//
// The block and its 8-in/4-out size follow the published design; the
// width parameter is this implementation's.
module mux_8to4 #(
  parameter int unsigned W = 4
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule

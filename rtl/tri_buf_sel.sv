// 2W:W selector made of two tristate buffers that drive one shared net.
//
// How it works: the buffer for d1 drives y while sel is one and floats
// otherwise; the buffer for d0 drives y while sel is zero. Exactly one
// buffer drives at any time, so y is never contended and never floats.
// This replaces the 2:1 multiplexer of a conventional carry select adder:
// the unused input is cut off instead of being gated through a mux.
//
// The two drivers on y are the purpose of this block, so a tool's
// "several drivers" note on y is expected. Where the target has no
// internal tristate buffers (most FPGAs), synthesis maps the pair to
// equivalent select logic.
//
// Interface: sel picks d1 (sel = 1) or d0 (sel = 0) onto y.
// Timing: purely combinational, one buffer delay from d, one enable delay
// from sel.
//
// Replacing the carry select multiplexers by tristate buffers follows the
// published design; the port names are this implementation's.
module tri_buf_sel #(
  parameter int unsigned W = 4
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output wire  [W-1:0] y
);

  assign y = sel ? d1 : {W{1'bz}};
  assign y = sel ? {W{1'bz}} : d0;

endmodule

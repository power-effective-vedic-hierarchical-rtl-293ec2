// Three-operand carry save adder (16 bits wide in the multiplier).
//
// How it works: one full adder per bit position, with no carry
// propagation between positions. Each full adder reduces the three bits of
// its column to a sum bit s[i] (weight 2^i) and a carry bit cy[i]
// (weight 2^(i+1)), so that a + b + c = s + 2*cy exactly. The carry vector
// is not shifted inside this block; the consumer shifts it, and must also
// account for cy[W-1], whose weight 2^W lies above the block's width.
//
// Interface: a, b, c are the three addends; s is the sum vector, cy the
// carry vector.
// Timing: purely combinational, one full-adder delay.
//
// The block's place and width (16 bits) follow the published multiplier;
// the full-adder-per-bit structure is the usual meaning of a carry save
// adder and is this implementation's choice.
module csa16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  always_comb begin
    s  = a ^ b ^ c;
    cy = (a & b) | (a & c) | (b & c);
  end

endmodule

// W-bit ripple carry adder, the group adder of the carry select adder.
//
// How it works: a chain of W full adders; the carry leaves each position
// and enters the next. In the carry select adder every group except the
// lowest is driven with cin = 0 and its result is corrected afterwards by
// a binary-to-excess-one converter when the real carry into the group
// turns out to be one.
//
// Interface: s = (a + b + cin) mod 2^W, cout is the carry out of bit W-1.
// Timing: purely combinational, W full-adder delays.
//
// The adder's presence in each group follows the published carry select
// adder; its width default (4) is this implementation's choice, since the
// adder is always instantiated with the group width.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < int'(W); i++) begin
      s[i] = a[i] ^ b[i] ^ c;
      c    = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
    end
    cout = c;
  end

endmodule

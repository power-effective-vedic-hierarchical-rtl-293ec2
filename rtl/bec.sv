// N-bit binary-to-excess-one converter (BEC): x = b + 1 (mod 2^N).
//
// How it works: an adder of a constant one needs no full adders. Bit 0 is
// inverted and every higher bit i is flipped when all bits below it are
// one:
//   X0 = ~B0,  X1 = B0 ^ B1,  X2 = B2 ^ (B0 & B1),  X3 = B3 ^ (B0 & B1 & B2)
// for N = 4, and likewise for wider converters. The AND chain that builds
// these conditions ends in ovf = &b, which is one exactly when b + 1
// overflows N bits; a neighbouring BEC of a wider increment uses it as its
// own select condition.
//
// Interface: b in, x = b + 1 out, ovf = (b is all ones).
// Timing: purely combinational; the AND chain is N-1 gates long.
//
// The bit equations for N = 4 are the published ones; the generalisation
// to other widths and the ovf output are this implementation's.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x,
  output logic         ovf
);

  always_comb begin
    logic run;  // AND of all bits below position i
    run = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      x[i] = b[i] ^ run;
      run  = run & b[i];
    end
    ovf = run;
  end

endmodule

// N x N unsigned Vedic multiplier (Urdhva Tiryakbhyam, "vertical and
// crosswise"), used with N = 8 as the base block of the 16x16 multiplier.
//
// How it works: product bit k is formed from column k of the partial
// product array. The column sum is the carry handed on by column k-1 plus
// every partial product a[i]&b[j] with i+j = k. The least significant bit
// of that sum is product bit R_k and the rest of it (C_k, which may be
// several bits wide) is handed to column k+1. For N = 8 this is exactly the
// set of equations R0 = A0B0, C1R1 = A0B1 + A1B0, ... C14R14 = C13 + A7B7 of
// the Vedic method; the last carry C14 is the product's top bit (bit 15).
// The column sums are written as integer additions; synthesis turns each
// one into a small compressor. A column accumulator of $clog2(2N+1) bits is
// enough: a column holds at most N partial products and its incoming carry
// never exceeds N.
//
// Interface: a, b are the operands, p = a * b.
// Timing: purely combinational, no clock.
//
// The column equations follow the Vedic method as published; writing them
// as a loop over columns, and the accumulator width, are choices of this
// implementation.
module vedic8x8 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned CW = $clog2(2 * N + 1);

  always_comb begin
    logic [CW-1:0] col;    // column sum C_k R_k
    logic [CW-1:0] carry;  // C_{k-1}, the part of the previous column handed on
    carry = '0;
    for (int k = 0; k < 2 * int'(N) - 1; k++) begin
      col = carry;
      for (int i = 0; i < int'(N); i++) begin
        if (k - i >= 0 && k - i < int'(N)) begin
          col = col + CW'(a[i] & b[k-i]);
        end
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    // The final carry C_{2N-2} is at most one bit wide: it is bit 2N-1.
    p[2*N-1] = carry[0];
  end

endmodule

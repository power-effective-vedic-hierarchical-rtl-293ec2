// 16x16 unsigned hierarchical multiplier built from four 8x8 Vedic
// multipliers: z = x * y, in one combinational pass.
//
// How it works. Split x = XH:XL and y = YH:YL into 8-bit halves. Then
//   x*y = a3 * 2^16 + (a1 + a2) * 2^8 + a0
// with a0 = XL*YL, a1 = XL*YH, a2 = XH*YL, a3 = XH*YH, each formed by a
// vedic8x8 block. The recombination is arranged by product byte:
//   z[7:0]   = a0[7:0], which nothing else touches;
//   z[23:8]  = low 16 bits of  a1 + a2 + {a3[7:0], a0[15:8]}. A 16-bit
//              carry save adder (csa16) reduces these three words to a sum
//              and a carry vector, and a 16-bit carry select adder with
//              tristate selectors (csla16_tri) adds the two;
//   z[31:24] = a3[15:8] + k, where k is the carry out of the middle sum.
// The top byte needs no adder: k is small, so a3[15:8] is only
// incremented, by binary-to-excess-one converters (BECs) and muxes
// (bec_mux8: two 4-bit BECs and two 8:4 muxes).
//
// The carry k can be 0, 1 or 2 (three 16-bit words can sum to more than
// 2^17; x = y = 65023 is one case). It has two sources: cc[15], the CSA
// carry whose weight 2^16 falls outside the 16-bit adder, and the carry
// out of the carry select adder. Each drives its own bec_mux8 stage, so
// the top byte is a3[15:8] + cc[15] + cout. The first stage depends only
// on a3 and the CSA, and settles while the carry select adder is still
// working; the second stage's BECs also run in parallel with it, so only
// one 8:4 mux is added after the adder's carry out.
//
// The carry select adder's group outputs are tristate nets with two
// drivers each, one enabled at a time; tools list them as nets with
// several drivers, which is intended.
//
// Interface: x, y in (16 bits), z out (32 bits).
// Timing: purely combinational, no clock and no reset; a registered
// wrapper, if wanted, is outside this block.
//
// The four-Vedic-block split, the CSA, the tristate carry select adder,
// the byte arrangement of the product and the two-4-bit-BEC increment of
// the top byte follow the published design. The second increment stage for
// a carry of two is this implementation's: with a single +1 stage the
// product would be wrong for about one operand pair in a hundred.
module hier_mult16
  import mult_pkg::*;
(
  input  logic [OP_W-1:0]   x,
  input  logic [OP_W-1:0]   y,
  output logic [PROD_W-1:0] z
);

  logic [OP_W-1:0]   a0, a1, a2, a3;  // half products
  logic [OP_W-1:0]   cs, cc;          // CSA sum and carry vectors
  logic [OP_W-1:0]   mid;             // product bits 23:8
  logic              mid_cout;        // carry out of the carry select adder
  logic [HALF_W-1:0] top1, top2;      // top byte after each increment stage

  vedic8x8 #(.N(HALF_W)) u_a0 (.a(x[HALF_W-1:0]),    .b(y[HALF_W-1:0]),    .p(a0));
  vedic8x8 #(.N(HALF_W)) u_a1 (.a(x[HALF_W-1:0]),    .b(y[OP_W-1:HALF_W]), .p(a1));
  vedic8x8 #(.N(HALF_W)) u_a2 (.a(x[OP_W-1:HALF_W]), .b(y[HALF_W-1:0]),    .p(a2));
  vedic8x8 #(.N(HALF_W)) u_a3 (.a(x[OP_W-1:HALF_W]), .b(y[OP_W-1:HALF_W]), .p(a3));

  csa16 #(.W(OP_W)) u_csa (
    .a(a1), .b(a2), .c({a3[HALF_W-1:0], a0[OP_W-1:HALF_W]}), .s(cs), .cy(cc)
  );

  csla16_tri u_csla (
    .a(cs), .b({cc[OP_W-2:0], 1'b0}), .s(mid), .cout(mid_cout)
  );

  bec_mux8 u_top1 (.b(a3[OP_W-1:HALF_W]), .sel(cc[OP_W-1]), .z(top1));
  bec_mux8 u_top2 (.b(top1),              .sel(mid_cout),   .z(top2));

  assign z = {top2, mid, a0[HALF_W-1:0]};

endmodule

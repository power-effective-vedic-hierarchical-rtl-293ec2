// 16-bit square-root carry select adder (CSlA) whose group results are
// chosen by tristate buffers instead of multiplexers.
//
// How it works: the 16 bits are cut into five groups of 2, 2, 3, 4 and 5
// bits (bits [1:0], [3:2], [6:4], [10:7], [15:11]). The lowest group is a
// plain ripple carry adder. Every other group has
//   - a ripple carry adder (RCA) that adds its bits assuming carry-in 0,
//     giving a (width+1)-bit result {carry, sum};
//   - a binary-to-excess-one converter (BEC) of width+1 bits that forms the
//     same result for carry-in 1, namely {carry, sum} + 1;
//   - a 2(width+1):(width+1) tristate buffer selector ("6:3", "8:4",
//     "10:5", "12:6") that puts one of the two on the group output, chosen
//     by the carry leaving the group below.
// The top bit of each selected result is the carry into the next group, so
// after the group sums settle only the selector chain ripples. The top
// group's carry is the adder's carry out.
//
// Each group output net ("chosen") has two tristate drivers by design,
// so tools report several drivers on it; exactly one of them is enabled at
// any time (see tri_buf_sel).
//
// Interface: s = (a + b) mod 2^16, cout = carry out of bit 15. There is no
// carry in: the multiplier never needs one.
// Timing: purely combinational.
//
// The group boundaries, the RCA/BEC/buffer structure and the buffer sizes
// follow the published adder. Its [10:7] group is given a 5-bit BEC, the
// width that matches that group's 10:5 buffer. Omitting a carry input is
// this implementation's choice.
module csla16_tri (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] s,
  output logic        cout
);

  localparam int unsigned NG = 5;
  localparam int unsigned GLO [NG] = '{0, 2, 4, 7, 11};  // lowest bit of each group
  localparam int unsigned GW  [NG] = '{2, 2, 3, 4, 5};   // width of each group

  logic [NG:1] c;  // c[g]: carry into group g

  // Group 0: plain ripple carry adder, no carry in.
  rca #(.W(GW[0])) u_rca0 (
    .a(a[GW[0]-1:0]), .b(b[GW[0]-1:0]), .cin(1'b0), .s(s[GW[0]-1:0]), .cout(c[1])
  );

  for (genvar g = 1; g < int'(NG); g++) begin : g_grp
    localparam int unsigned L = GLO[g];
    localparam int unsigned W = GW[g];

    logic [W-1:0] rs;     // group sum for carry-in 0
    logic         rc;     // group carry for carry-in 0
    logic [W:0]   inc;    // {rc, rs} + 1: result for carry-in 1
    wire  [W:0]   chosen; // driven by the tristate selector

    rca #(.W(W)) u_rca (
      .a(a[L+W-1:L]), .b(b[L+W-1:L]), .cin(1'b0), .s(rs), .cout(rc)
    );
    bec #(.N(W + 1)) u_bec (.b({rc, rs}), .x(inc), .ovf());
    tri_buf_sel #(.W(W + 1)) u_buf (.sel(c[g]), .d0({rc, rs}), .d1(inc), .y(chosen));

    assign s[L+W-1:L] = chosen[W-1:0];
    assign c[g+1]     = chosen[W];
  end

  assign cout = c[NG];

endmodule

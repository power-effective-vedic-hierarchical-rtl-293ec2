// End-to-end self-checking testbench for hier_mult16 at its only (16x16)
// size. It applies
//   - the four operand pairs of the reference simulation (1x1, 20x40,
//     350x500, 65535x65535) with their expected products,
//   - corner operands (0, 1, powers of two, all ones, x = y = 65023, whose
//     middle sum carries two into the top byte),
//   - 300,000 random pairs,
// and compares z with the 32-bit integer product.
//
// From the operands alone it also works out which mechanisms each pair
// exercises, and fails if one never happened:
//   - carry of 0, 1 and 2 into the top byte;
//   - the first top-byte increment (CSA carry out of bit 15) and the second
//     (carry out of the carry select adder);
//   - in each increment stage, the high-nibble converter being selected;
//   - in the carry select adder, each group taking its converter path.
module tb_hier_mult16;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [15:0] x, y;
  logic [31:0] z;

  hier_mult16 dut (.x(x), .y(y), .z(z));

  // mechanism counters
  int unsigned top_carry [3];
  int unsigned inc1 = 0, inc2 = 0;
  int unsigned nib1 = 0, nib2 = 0;
  int unsigned grp1 [4];
  localparam int unsigned GLO [4] = '{2, 4, 7, 11};

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] xi, input logic [15:0] yi);
    longint unsigned expected;
    int unsigned a0, a1, a2, a3, w3, cs, ccv, cb, c15, mid, cout_mid, hi, hi1;
    x = xi;
    y = yi;
    #1;
    expected = longint'(xi) * longint'(yi);
    checks++;
    if (z !== 32'(expected)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d: got %0d expected %0d", xi, yi, z, expected);
    end
    // Reference decomposition, independent of the design's signals.
    a0  = int'(xi[7:0])  * int'(yi[7:0]);
    a1  = int'(xi[7:0])  * int'(yi[15:8]);
    a2  = int'(xi[15:8]) * int'(yi[7:0]);
    a3  = int'(xi[15:8]) * int'(yi[15:8]);
    w3  = ((a3 & 'hFF) << 8) | (a0 >> 8);
    cs  = (a1 ^ a2 ^ w3) & 'hFFFF;
    ccv = ((a1 & a2) | (a1 & w3) | (a2 & w3)) & 'hFFFF;
    cb  = (ccv << 1) & 'hFFFF;
    c15 = ccv >> 15;
    mid = cs + cb;
    cout_mid = mid >> 16;
    top_carry[c15 + cout_mid]++;
    hi  = a3 >> 8;
    hi1 = (hi + c15) & 'hFF;
    if (c15 != 0) inc1++;
    if (cout_mid != 0) inc2++;
    if (c15 != 0 && (hi & 'hF) == 'hF) nib1++;
    if (cout_mid != 0 && (hi1 & 'hF) == 'hF) nib2++;
    for (int g = 0; g < 4; g++) begin
      int unsigned mask;
      mask = (1 << GLO[g]) - 1;
      if ((((cs & mask) + (cb & mask)) >> GLO[g]) != 0) grp1[g]++;
    end
  endtask

  task automatic expect_mech(input string what, input int unsigned count);
    checks++;
    $display("mechanism %-36s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) top_carry[k] = 0;
    for (int g = 0; g < 4; g++) grp1[g] = 0;

    // The four pairs of the reference waveform, with their printed products.
    apply(16'd1, 16'd1);
    checks++; if (z !== 32'd1) failures++;
    apply(16'd20, 16'd40);
    checks++; if (z !== 32'd800) failures++;
    apply(16'd350, 16'd500);
    checks++; if (z !== 32'd175000) failures++;
    apply(16'd65535, 16'd65535);
    checks++; if (z !== 32'd4294836225) failures++;

    // Corners.
    apply(16'd0, 16'd0);
    apply(16'd0, 16'hFFFF);
    apply(16'hFFFF, 16'd1);
    apply(16'd65023, 16'd65023);
    apply(16'hFF00, 16'hFF00);
    apply(16'h00FF, 16'hFF00);
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        apply(16'(1 << i), 16'(1 << j));
        apply(16'((1 << i) - 1), 16'hFFFF - 16'(j));
      end
    end

    // Random pairs.
    for (int i = 0; i < 300000; i++) begin
      apply(16'($urandom), 16'($urandom));
    end

    expect_mech("top-byte carry 0", top_carry[0]);
    expect_mech("top-byte carry 1", top_carry[1]);
    expect_mech("top-byte carry 2", top_carry[2]);
    expect_mech("increment by CSA carry", inc1);
    expect_mech("increment by CSlA carry out", inc2);
    expect_mech("high nibble BEC, first stage", nib1);
    expect_mech("high nibble BEC, second stage", nib2);
    expect_mech("CSlA group [3:2] BEC path", grp1[0]);
    expect_mech("CSlA group [6:4] BEC path", grp1[1]);
    expect_mech("CSlA group [10:7] BEC path", grp1[2]);
    expect_mech("CSlA group [15:11] BEC path", grp1[3]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

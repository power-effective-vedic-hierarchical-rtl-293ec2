// Self-checking testbench for vedic8x8: all 65,536 operand pairs of the
// 8x8 Vedic multiplier are compared with the integer product. A second
// instance with N = 4 checks that the column construction is not tied to
// one width (all 256 pairs).
module tb_vedic8x8;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  vedic8x8            dut   (.a(a),  .b(b),  .p(p));
  vedic8x8 #(.N(4))   dut4  (.a(a4), .b(b4), .p(p4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL N=4 %0d*%0d: got %0d", i, j, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

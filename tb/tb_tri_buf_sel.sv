// Self-checking testbench for tri_buf_sel: random data words with both
// select values, at the default width and at 6 bits (the 12:6 buffer).
module tb_tri_buf_sel;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic       sel;
  logic [3:0] d0, d1;
  wire  [3:0] y;
  logic [5:0] e0, e1;
  wire  [5:0] y6;

  tri_buf_sel          dut  (.sel(sel), .d0(d0), .d1(d1), .y(y));
  tri_buf_sel #(.W(6)) dut6 (.sel(sel), .d0(e0), .d1(e1), .y(y6));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      d0  = 4'($urandom);
      d1  = 4'($urandom);
      e0  = 6'($urandom);
      e1  = 6'($urandom);
      sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0) || y6 !== (sel ? e1 : e0)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

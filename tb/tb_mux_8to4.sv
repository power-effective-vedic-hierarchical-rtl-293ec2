// Self-checking testbench for mux_8to4: every select value and data pair.
module tb_mux_8to4;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic       sel;
  logic [3:0] d0, d1, y;

  mux_8to4 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          sel = 1'(s); d0 = 4'(i); d1 = 4'(j);
          #1;
          checks++;
          if (y !== 4'(s ? j : i)) begin
            failures++;
            if (failures < 10) $display("FAIL sel=%0d d0=%0d d1=%0d y=%0d", s, i, j, y);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

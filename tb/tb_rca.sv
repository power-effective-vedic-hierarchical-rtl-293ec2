// Self-checking testbench for rca: exhaustive at the default width of 4
// bits and at 5 bits (the widest group of the carry select adder), carry
// in 0 and 1, against integer addition.
module tb_rca;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [3:0] a4, b4, s4;
  logic       cin4, co4;
  logic [4:0] a5, b5, s5;
  logic       cin5, co5;

  rca          dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(co4));
  rca #(.W(5)) dut5 (.a(a5), .b(b5), .cin(cin5), .s(s5), .cout(co5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < 32; i++) begin
        for (int j = 0; j < 32; j++) begin
          a4 = 4'(i); b4 = 4'(j); cin4 = 1'(ci);
          a5 = 5'(i); b5 = 5'(j); cin5 = 1'(ci);
          #1;
          if (i < 16 && j < 16) begin
            checks++;
            if ({co4, s4} !== 5'(i + j + ci)) begin
              failures++;
              if (failures < 10) $display("FAIL W=4 %0d+%0d+%0d: got %0d", i, j, ci, {co4, s4});
            end
          end
          checks++;
          if ({co5, s5} !== 6'(i + j + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL W=5 %0d+%0d+%0d: got %0d", i, j, ci, {co5, s5});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for csla16_tri: corner and random operand pairs
// against integer addition. For every pair it works out, from the
// operands alone, the carry into each of the four selected groups (bits
// 2, 4, 7 and 11), counts how often each group's converter path (carry 1)
// and plain path (carry 0) was taken, and fails if any path never was.
module tb_csla16_tri;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned sel1 [4];
  int unsigned sel0 [4];
  localparam int unsigned GLO [4] = '{2, 4, 7, 11};

  logic [15:0] a, b, s;
  logic        cout;

  csla16_tri dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned sum;
    #1;
    sum = int'(a) + int'(b);
    for (int g = 0; g < 4; g++) begin
      int unsigned mask;
      mask = (1 << GLO[g]) - 1;
      if ((((int'(a) & mask) + (int'(b) & mask)) >> GLO[g]) != 0) sel1[g]++;
      else sel0[g]++;
    end
    checks++;
    if ({cout, s} !== 17'(sum)) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h: got %h", a, b, {cout, s});
    end
  endtask

  initial begin
    for (int g = 0; g < 4; g++) begin sel1[g] = 0; sel0[g] = 0; end
    a = '0;       b = '0;        check();
    a = '1;       b = 16'd1;     check();
    a = '1;       b = '1;        check();
    a = 16'h7FFF; b = 16'h0001;  check();
    a = 16'h0003; b = 16'h0001;  check();
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      check();
    end
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (sel1[g] == 0 || sel0[g] == 0) begin
        failures++;
        $display("FAIL group at bit %0d: carry-1 path %0d times, carry-0 path %0d times",
                 GLO[g], sel1[g], sel0[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

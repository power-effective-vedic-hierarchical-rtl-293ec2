// Self-checking testbench for csa16: random and corner operand triples.
// Each is checked bit by bit (sum = parity, carry = majority of the three
// column bits) and as a whole (a + b + c = s + 2*cy).
module tb_csa16;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [15:0] a, b, c, s, cy;

  csa16 dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned total;
    int unsigned bit_ok;
    #1;
    total  = int'(a) + int'(b) + int'(c);
    bit_ok = 1;
    for (int i = 0; i < 16; i++) begin
      int unsigned n;
      n = int'(a[i]) + int'(b[i]) + int'(c[i]);
      if (s[i] !== n[0] || cy[i] !== (n >= 2)) bit_ok = 0;
    end
    checks++;
    if (!bit_ok || int'(s) + 2 * int'(cy) != total) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h c=%h s=%h cy=%h", a, b, c, s, cy);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0;        check();
    a = '1; b = '1; c = '1;        check();
    a = '1; b = '0; c = '0;        check();
    a = 16'hAAAA; b = 16'h5555; c = 16'hFFFF; check();
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      c = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

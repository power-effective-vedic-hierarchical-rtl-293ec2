// Self-checking testbench for bec: exhaustive at the default 4 bits (the
// converter of equations X0..X3) and at 6 bits (the widest converter in
// the carry select adder). Checks x = b + 1 mod 2^N and ovf = (b all ones).
module tb_bec;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [3:0] b4, x4;
  logic       o4;
  logic [5:0] b6, x6;
  logic       o6;

  bec          dut4 (.b(b4), .x(x4), .ovf(o4));
  bec #(.N(6)) dut6 (.b(b6), .x(x6), .ovf(o6));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      b4 = 4'(i);
      b6 = 6'(i);
      #1;
      if (i < 16) begin
        checks++;
        // The four published bit equations, evaluated directly.
        if (x4[0] !== ~b4[0] || x4[1] !== (b4[0] ^ b4[1]) ||
            x4[2] !== (b4[2] ^ (b4[0] & b4[1])) ||
            x4[3] !== (b4[3] ^ (b4[0] & b4[1] & b4[2]))) begin
          failures++;
          $display("FAIL N=4 equations b=%0d x=%0d", b4, x4);
        end
        checks++;
        if (x4 !== 4'(i + 1) || o4 !== (i == 15)) begin
          failures++;
          $display("FAIL N=4 b=%0d x=%0d ovf=%0b", b4, x4, o4);
        end
      end
      checks++;
      if (x6 !== 6'(i + 1) || o6 !== (i == 63)) begin
        failures++;
        $display("FAIL N=6 b=%0d x=%0d ovf=%0b", b6, x6, o6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

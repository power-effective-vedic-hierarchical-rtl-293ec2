// Self-checking testbench for bec_mux8: every 8-bit word with sel = 0 and
// sel = 1, checked against z = b + sel (mod 256). Counts the words for
// which the high nibble's converter is selected (carry out of the low
// nibble), and fails if that never happened.
module tb_bec_mux8;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned nibble_carries = 0;

  logic [7:0] b, z;
  logic       sel;

  bec_mux8 dut (.b(b), .sel(sel), .z(z));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 256; i++) begin
        b = 8'(i); sel = 1'(s);
        #1;
        checks++;
        if (s == 1 && i[3:0] == 4'hF) nibble_carries++;
        if (z !== 8'(i + s)) begin
          failures++;
          if (failures < 10) $display("FAIL b=%0d sel=%0d z=%0d", i, s, z);
        end
      end
    end
    checks++;
    if (nibble_carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Exhaustive self-checking testbench for comp32_s.
// Applies all 8 input patterns and checks the weighted identity
//   signed 3-2: a+b-c = -s+2co (the two-negative case is its negation)
// Because the output weights give eight distinct values, the identity fixes
// every output bit.
module tb_comp32_s;
  int checks = 0, failures = 0;
  logic a, b, c;
  logic s, co;

  comp32_s dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [2:0] v;
      int want, got;
      v = 3'(i);
      a = v[0]; b = v[1]; c = v[2];
      #1;
      want = (1)*int'(a) + (1)*int'(b) + (-1)*int'(c);
      got  = (-1)*int'(s) + (2)*int'(co);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL inputs=%b: outputs encode %0d, expected %0d", v, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

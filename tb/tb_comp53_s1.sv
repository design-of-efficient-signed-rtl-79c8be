// Exhaustive self-checking testbench for comp53_s1.
// Applies all 32 input patterns and checks the weighted identity
//   one signed input: b+c+d+e-a = -s+2c0+4c1
// Because the output weights give eight distinct values, the identity fixes
// every output bit.
module tb_comp53_s1;
  int checks = 0, failures = 0;
  logic a, b, c, d, e;
  logic s, c0, c1;

  comp53_s1 dut (.a(a), .b(b), .c(c), .d(d), .e(e), .s(s), .c0(c0), .c1(c1));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [4:0] v;
      int want, got;
      v = 5'(i);
      a = v[0]; b = v[1]; c = v[2]; d = v[3]; e = v[4];
      #1;
      want = (-1)*int'(a) + (1)*int'(b) + (1)*int'(c) + (1)*int'(d) + (1)*int'(e);
      got  = (-1)*int'(s) + (2)*int'(c0) + (4)*int'(c1);
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

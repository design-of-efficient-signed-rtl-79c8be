// Exhaustive self-checking testbench for comp43_u.
// Applies all 16 input patterns and checks the weighted identity
//   4-3 counter: a+b+c+d = s+2c0+4c1
// Because the output weights give eight distinct values, the identity fixes
// every output bit.
module tb_comp43_u;
  int checks = 0, failures = 0;
  logic a, b, c, d;
  logic s, c0, c1;

  comp43_u dut (.a(a), .b(b), .c(c), .d(d), .s(s), .c0(c0), .c1(c1));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [3:0] v;
      int want, got;
      v = 4'(i);
      a = v[0]; b = v[1]; c = v[2]; d = v[3];
      #1;
      want = (1)*int'(a) + (1)*int'(b) + (1)*int'(c) + (1)*int'(d);
      got  = (1)*int'(s) + (2)*int'(c0) + (4)*int'(c1);
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

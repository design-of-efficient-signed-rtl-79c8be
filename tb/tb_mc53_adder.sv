// Self-checking testbench for mc53_adder.
// One instance per sign pattern (all eight combinations of subtracted
// operands) at the default width of 16 bits, driven with random and corner
// operands; the result is compared with the same sum computed in integer
// arithmetic and reduced modulo 2^16. A 4-bit instance with two subtracted
// operands is checked exhaustively.
module tb_mc53_adder;
  int checks = 0, failures = 0;
  localparam int W = 16;
  logic [W-1:0] x0, x1, x2;
  logic [W-1:0] y [8];
  logic [3:0]   s0, s1, s2, ys;

  for (genvar m = 0; m < 8; m++) begin : g_dut
    mc53_adder #(.SUB(3'(m))) dut (.x0(x0), .x1(x1), .x2(x2), .y(y[m]));
  end
  mc53_adder #(.W(4), .SUB(3'b110)) dut4 (.x0(s0), .x1(s1), .x2(s2), .y(ys));

  function automatic logic [W-1:0] model(int m, logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] c);
    longint r;
    r = (m & 1 ? -longint'(a) : longint'(a))
      + (m & 2 ? -longint'(b) : longint'(b))
      + (m & 4 ? -longint'(c) : longint'(c));
    return W'(r);
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s0 = '0; s1 = '0; s2 = '0;
    for (int n = 0; n < 5000; n++) begin
      case (n)
        0:       begin x0 = '1; x1 = '1; x2 = '1; end
        1:       begin x0 = '0; x1 = '0; x2 = '0; end
        2:       begin x0 = 16'h8000; x1 = 16'h8000; x2 = 16'h7fff; end
        default: begin x0 = W'($urandom); x1 = W'($urandom); x2 = W'($urandom); end
      endcase
      #1;
      for (int m = 0; m < 8; m++) begin
        checks++;
        if (y[m] !== model(m, x0, x1, x2)) begin
          failures++;
          if (failures < 10)
            $display("FAIL sub=%b x=%h,%h,%h got %h want %h", 3'(m), x0, x1, x2, y[m], model(m, x0, x1, x2));
        end
      end
    end
    for (int i = 0; i < 4096; i++) begin
      {s0, s1, s2} = 12'(i);
      #1;
      checks++;
      if (ys !== 4'(int'(s0) - int'(s1) - int'(s2))) begin
        failures++;
        if (failures < 10) $display("FAIL 4-bit %h-%h-%h got %h", s0, s1, s2, ys);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

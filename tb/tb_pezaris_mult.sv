// Self-checking testbench for pezaris_mult.
// The default 8x8 multiplier and the 4x4 one (the two sizes the design is
// characterised at) are checked exhaustively against the signed product
// computed by the simulator; three odd shapes used inside the butterfly
// (9x8, 8x17, 3x5) are checked on random and corner operands.
module tb_pezaris_mult;
  int checks = 0, failures = 0;

  logic signed [7:0]  a8, b8;   logic signed [15:0] p8;
  logic signed [3:0]  a4, b4;   logic signed [7:0]  p4;
  logic signed [8:0]  a9;       logic signed [16:0] p98;
  logic signed [16:0] b17;      logic signed [24:0] p817;
  logic signed [2:0]  a3;       logic signed [4:0]  b5;  logic signed [7:0] p35;

  pezaris_mult                        dut8  (.a(a8), .b(b8),  .p(p8));
  pezaris_mult #(.AW(4), .BW(4))      dut4  (.a(a4), .b(b4),  .p(p4));
  pezaris_mult #(.AW(9), .BW(8))      dut98 (.a(a9), .b(b8),  .p(p98));
  pezaris_mult #(.AW(8), .BW(17))     dut817(.a(a8), .b(b17), .p(p817));
  pezaris_mult #(.AW(3), .BW(5))      dut35 (.a(a3), .b(b5),  .p(p35));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a9 = '0; b17 = '0; a3 = '0; b5 = '0; a4 = '0; b4 = '0;
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1 check("8x8", p8, i * j);
      end
    for (int i = -8; i < 8; i++)
      for (int j = -8; j < 8; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1 check("4x4", p4, i * j);
      end
    for (int i = -4; i < 4; i++)
      for (int j = -16; j < 16; j++) begin
        a3 = 3'(i); b5 = 5'(j);
        #1 check("3x5", p35, i * j);
      end
    for (int n = 0; n < 20000; n++) begin
      a9  = (n < 4) ? ((n & 1) ? 9'h100 : 9'h0ff) : 9'($urandom);
      b8  = (n < 4) ? ((n & 2) ? 8'h80  : 8'h7f)  : 8'($urandom);
      a8  = 8'($urandom);
      b17 = (n < 2) ? ((n & 1) ? 17'h10000 : 17'h0ffff) : 17'($urandom);
      #1;
      check("9x8",  p98,  longint'(a9) * longint'(b8));
      check("8x17", p817, longint'(a8) * longint'(b17));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

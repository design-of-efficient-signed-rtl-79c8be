// Pipeline register with a build-time bypass.
// EN=1: q follows d one clock later; an active-low asynchronous reset
// clears it. EN=0: q is d, with no storage, so the same datapath can be
// built with or without its pipeline. Used between the stages of the
// butterfly.
module pipe_reg #(
  parameter int W  = 1,
  parameter bit EN = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (EN) begin : g_ff
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= d;
    end
  end else begin : g_wire
    assign q = d;
  end
endmodule

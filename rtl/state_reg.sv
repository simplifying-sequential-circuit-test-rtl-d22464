// state_reg: the machine's flip-flops, a plain D register with a
// synchronous, active-high reset.
//
// It holds the state code (three flip-flops for M2) and, in the concurrent
// error detection extension, the single parity flip-flop. The scheme needs
// no change to the flip-flops (no scan multiplexers), which is why this is
// an ordinary register. The reset style is this design's choice.
//
// Timing: q_o takes d_i at each rising edge of clk_i; with rst_i high it
// takes RESET_VALUE instead.
module state_reg #(
  parameter int unsigned      WIDTH       = 3,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(posedge clk_i) begin
    if (rst_i) q_o <= RESET_VALUE;
    else       q_o <= d_i;
  end

endmodule

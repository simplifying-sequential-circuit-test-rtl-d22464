// pcdft_m2: the example machine M2 built with the parity-checker
// design-for-testability scheme.
//
// The machine is an ordinary synchronous Mealy FSM (fsm_logic feeding
// state_reg) whose states carry parity-assigned codes, plus a parity
// checker on the state lines driving one extra output, to_o ("TO"). Because
// the codes of states that are hard to tell apart have opposite parity, a
// transition that lands in a wrong state usually shows on to_o in the very
// next cycle, with no propagation sequence through the outputs. That makes
// a test sequence that simply walks every transition once (plus one vector)
// detect every single-state-transition fault of M2.
//
// CED = 0 (default) is the plain scheme: to_o is the parity of the present
// state code, which a tester compares with the parity the good machine's
// state should have. CED = 1 adds the concurrent-error-detection extension:
// parity_bit_logic predicts the next state's parity, a parity flip-flop
// holds it, and the checker watches state and parity flip-flops together,
// so to_o = 1 means an error in normal operation as well.
//
// TABLE feeds the machine's logic and PARITY_TABLE the parity predictor;
// they are the same machine and default to M2. They are separate only so
// that a testbench can model a fault in the machine's logic alone.
//
// Timing: out_o and to_o are combinational from the present state (and, for
// out_o, in_i); the state advances on each rising edge of clk_i. rst_i is
// synchronous and active high and puts the machine in its reset state A.
module pcdft_m2
  import m2_pkg::*;
#(
  parameter bit          CED          = 1'b0,
  parameter table_t      TABLE        = M2_TABLE,
  parameter table_t      PARITY_TABLE = M2_TABLE,
  parameter code_table_t CODES        = M2A_CODES
) (
  input  logic clk_i,
  input  logic rst_i,
  input  logic in_i,   // primary input
  output logic out_o,  // primary output
  output logic to_o    // parity checker output (TO)
);

  code_t state_q;
  code_t state_d;

  fsm_logic #(
    .TABLE (TABLE),
    .CODES (CODES)
  ) u_logic (
    .in_i    (in_i),
    .state_i (state_q),
    .out_o   (out_o),
    .next_o  (state_d)
  );

  state_reg #(
    .WIDTH       (STATE_W),
    .RESET_VALUE (CODES[RESET_STATE])
  ) u_state (
    .clk_i (clk_i),
    .rst_i (rst_i),
    .d_i   (state_d),
    .q_o   (state_q)
  );

  if (CED) begin : g_ced
    logic pbit_d;
    logic pbit_q;

    parity_bit_logic #(
      .TABLE (PARITY_TABLE),
      .CODES (CODES)
    ) u_pbit_logic (
      .in_i    (in_i),
      .state_i (state_q),
      .pbit_o  (pbit_d)
    );

    state_reg #(
      .WIDTH       (1),
      .RESET_VALUE (code_parity(CODES[RESET_STATE]))
    ) u_pbit_ff (
      .clk_i (clk_i),
      .rst_i (rst_i),
      .d_i   (pbit_d),
      .q_o   (pbit_q)
    );

    parity_checker #(
      .WIDTH (STATE_W + 1)
    ) u_checker (
      .lines_i ({pbit_q, state_q}),
      .to_o    (to_o)
    );
  end else begin : g_plain
    parity_checker #(
      .WIDTH (STATE_W)
    ) u_checker (
      .lines_i (state_q),
      .to_o    (to_o)
    );
  end

endmodule

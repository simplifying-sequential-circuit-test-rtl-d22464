// parity_bit_logic: next-state parity predictor of the concurrent error
// detection extension of the parity-checker DFT scheme.
//
// From the primary input and the present state code it computes, with logic
// of its own, the parity that the next state's code should have. The parity
// flip-flop stores it, so that state flip-flops plus parity flip-flop always
// hold an even number of ones in a fault-free machine; the parity checker
// over all of them then raises TO on an upset or on a wrong state transition.
// This block and its role come from the scheme; the table-driven
// construction and the handling of the two unused codes (predict the parity
// of the reset state's code, matching fsm_logic) are this design's own.
//
// Its transition table is a parameter separate from the one of fsm_logic so
// that a faulty transition in the machine's logic is not mirrored here.
//
// Purely combinational; no clock.
module parity_bit_logic
  import m2_pkg::*;
#(
  parameter table_t      TABLE = M2_TABLE,
  parameter code_table_t CODES = M2A_CODES
) (
  input  logic  in_i,     // primary input
  input  code_t state_i,  // present state code
  output logic  pbit_o    // predicted parity of the next state's code
);

  // One row per state, resolved at elaboration: a code comparator and the
  // two parities this state's successors have.
  logic [NUM_STATES-1:0] hit;
  logic [NUM_STATES-1:0] row_pbit;

  for (genvar s = 0; s < NUM_STATES; s++) begin : g_row
    localparam code_t C  = CODES[s];
    localparam logic  P0 = code_parity(CODES[TABLE[s][0].next]);
    localparam logic  P1 = code_parity(CODES[TABLE[s][1].next]);
    assign hit[s]      = (state_i == C);
    assign row_pbit[s] = in_i ? P1 : P0;
  end

  always_comb begin
    pbit_o = code_parity(CODES[RESET_STATE]);
    for (int s = 0; s < NUM_STATES; s++) begin
      if (hit[s]) pbit_o = row_pbit[s];
    end
  end

endmodule

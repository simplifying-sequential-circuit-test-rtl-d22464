// fsm_logic: next-state and output logic ("combinational logic") of the
// machine M2 on its parity-assigned state codes.
//
// The present state code state_i is matched against the code table; the
// matching state's entry of the transition table for input in_i gives the
// Mealy output out_o and the state whose code becomes next_o. Both tables
// are parameters so that the same logic serves any six-state, one-input
// machine; their defaults are M2 and its M2a codes.
//
// The two codes that M2a leaves unused (011 and 111) are not covered by the
// machine's specification. This design sends them to the reset state's code
// with output 0, so the machine recovers from them in one clock.
//
// Purely combinational; no clock.
module fsm_logic
  import m2_pkg::*;
#(
  parameter table_t      TABLE = M2_TABLE,
  parameter code_table_t CODES = M2A_CODES
) (
  input  logic  in_i,     // primary input
  input  code_t state_i,  // present state code
  output logic  out_o,    // primary output
  output code_t next_o    // next state code
);

  // One row per state: does the present code match, and what would this
  // state do under the present input. Row constants are resolved here, at
  // elaboration, so the hardware is six code comparators and input muxes.
  logic  [NUM_STATES-1:0] hit;
  code_t [NUM_STATES-1:0] row_next;
  logic  [NUM_STATES-1:0] row_out;

  for (genvar s = 0; s < NUM_STATES; s++) begin : g_row
    localparam code_t C  = CODES[s];
    localparam code_t N0 = CODES[TABLE[s][0].next];
    localparam code_t N1 = CODES[TABLE[s][1].next];
    localparam logic  O0 = TABLE[s][0].out;
    localparam logic  O1 = TABLE[s][1].out;
    assign hit[s]      = (state_i == C);
    assign row_next[s] = in_i ? N1 : N0;
    assign row_out[s]  = in_i ? O1 : O0;
  end

  // The codes are distinct, so at most one row hits; no hit means an
  // unused code.
  always_comb begin
    out_o  = 1'b0;
    next_o = CODES[RESET_STATE];
    for (int s = 0; s < NUM_STATES; s++) begin
      if (hit[s]) begin
        out_o  = row_out[s];
        next_o = row_next[s];
      end
    end
  end

endmodule

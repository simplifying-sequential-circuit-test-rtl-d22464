// m2_pkg: types and constants of the example machine M2 and its
// parity-assigned state codes.
//
// M2 is a six-state Mealy machine with one input bit and one output bit.
// Its transition table (next state / output for input 0 and input 1) is
//
//          in=0   in=1
//     A    C/1    E/1      (A is the reset state)
//     B    A/0    D/1
//     C    E/0    D/1
//     D    F/1    A/1
//     E    B/1    F/0
//     F    B/1    C/1
//
// The state codes are the parity-driven assignment "M2a": states A, C and F
// get codes of even parity, B, D and E codes of odd parity, so that each
// state pair that is hard to tell apart from the outputs alone (B/C, E/F,
// A/D, ...) differs in the parity of its code. The codes themselves and the
// table come from the published example; the symbolic state indices, the
// table layout and the helper functions are this design's own.
package m2_pkg;

  localparam int unsigned NUM_STATES = 6;  // states of M2
  localparam int unsigned STATE_W    = 3;  // state flip-flops

  // Symbolic state index; this is not the state code.
  typedef enum logic [2:0] {ST_A, ST_B, ST_C, ST_D, ST_E, ST_F} state_e;

  typedef logic [STATE_W-1:0] code_t;

  // One state transition: destination state and Mealy output.
  typedef struct packed {
    state_e next;
    logic   out;
  } trans_t;

  // Transition table indexed [present state][input value]. Packed, with
  // ascending ranges, so that a table is one constant vector and its rows
  // are written in the order A..F.
  typedef trans_t [0:1] row_t;
  typedef row_t [0:NUM_STATES-1] table_t;

  // State code of each state, indexed by the symbolic state.
  typedef code_t [0:NUM_STATES-1] code_table_t;

  localparam state_e RESET_STATE = ST_A;

  localparam table_t M2_TABLE = '{
    '{'{ST_C, 1'b1}, '{ST_E, 1'b1}},   // A
    '{'{ST_A, 1'b0}, '{ST_D, 1'b1}},   // B
    '{'{ST_E, 1'b0}, '{ST_D, 1'b1}},   // C
    '{'{ST_F, 1'b1}, '{ST_A, 1'b1}},   // D
    '{'{ST_B, 1'b1}, '{ST_F, 1'b0}},   // E
    '{'{ST_B, 1'b1}, '{ST_C, 1'b1}}    // F
  };

  // Parity-driven state assignment M2a.
  // Even: A=000, C=110, F=101.  Odd: B=010, D=100, E=001.
  localparam code_table_t M2A_CODES = '{
    3'b000,   // A
    3'b010,   // B
    3'b110,   // C
    3'b100,   // D
    3'b001,   // E
    3'b101    // F
  };

  // Parity of a code: 1 for an odd number of ones.
  function automatic logic code_parity(code_t c);
    return ^c;
  endfunction

endpackage

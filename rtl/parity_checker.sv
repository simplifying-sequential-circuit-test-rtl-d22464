// parity_checker: the parity checker of the parity-checker DFT scheme.
//
// An XOR tree over the lines it watches; with WIDTH lines it uses WIDTH-1
// two-input XOR gates. The output to_o is 1 when an odd number of the lines
// are 1. On the plain scheme it watches the state flip-flops, so to_o tells
// the tester the parity of the present state code, which the parity-driven
// state assignment makes different for states that are hard to tell apart.
// With the concurrent-error-detection extension it also watches the parity
// flip-flop, and to_o = 1 then flags an error.
//
// Purely combinational. The balanced-tree shape is this design's choice;
// only the XOR-tree function and gate count are fixed by the scheme.
module parity_checker #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] lines_i,
  output logic             to_o
);

  // Level l of the tree holds ceil(WIDTH / 2^l) partial parities.
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  logic [WIDTH-1:0] lvl [LEVELS+1];

  assign lvl[0] = lines_i;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = (WIDTH + (1 << (l - 1)) - 1) >> (l - 1);
    localparam int unsigned NOUT = (NIN + 1) / 2;
    for (genvar k = 0; k < NOUT; k++) begin : g_node
      if (2 * k + 1 < NIN) begin : g_xor
        assign lvl[l][k] = lvl[l-1][2*k] ^ lvl[l-1][2*k+1];
      end else begin : g_pass
        assign lvl[l][k] = lvl[l-1][2*k];
      end
    end
    if (NOUT < WIDTH) begin : g_unused
      assign lvl[l][WIDTH-1:NOUT] = '0;
    end
  end

  assign to_o = lvl[LEVELS][0];

endmodule

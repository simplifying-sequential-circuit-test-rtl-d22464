// tb_fsm_logic: checks the next-state and output logic of M2 for every
// state code and input value, including the two unused codes, against a
// transition table and code list written out here independently of the
// package.
module tb_fsm_logic;
  int checks = 0;
  int failures = 0;

  logic       in;
  logic [2:0] st;
  logic       out;
  logic [2:0] nxt;

  fsm_logic dut (.in_i(in), .state_i(st), .out_o(out), .next_o(nxt));

  // Row order A..F. Codes: A 000, B 010, C 110, D 100, E 001, F 101.
  localparam logic [2:0] CODE [6] = '{3'b000, 3'b010, 3'b110, 3'b100, 3'b001, 3'b101};
  localparam string NEXT0 = "CAEFBB";
  localparam string NEXT1 = "EDDAFC";
  localparam string OUT0  = "100111";
  localparam string OUT1  = "111101";

  function automatic logic [2:0] code_of(byte c);
    return CODE[c - "A"];
  endfunction

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s state=%b in=%b got %b expected %b", what, st, in, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 6; s++) begin
      st = CODE[s];
      in = 1'b0; #1;
      check("next0", nxt, code_of(NEXT0[s]));
      check("out0", {2'b0, out}, {2'b0, OUT0[s] == "1"});
      in = 1'b1; #1;
      check("next1", nxt, code_of(NEXT1[s]));
      check("out1", {2'b0, out}, {2'b0, OUT1[s] == "1"});
    end
    // Unused codes go to the reset state A with output 0.
    for (int u = 0; u < 2; u++) begin
      st = (u == 0) ? 3'b011 : 3'b111;
      for (int x = 0; x < 2; x++) begin
        in = 1'(x); #1;
        check("unused_next", nxt, 3'b000);
        check("unused_out", {2'b0, out}, 3'b000);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

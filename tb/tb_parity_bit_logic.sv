// tb_parity_bit_logic: checks the next-state parity prediction for every
// state code and input value against the even/odd grouping of M2's states
// (even: A, C, F; odd: B, D, E) and the next-state table, both written out
// here independently of the package. Unused codes predict the parity of the
// reset state A (even).
module tb_parity_bit_logic;
  int checks = 0;
  int failures = 0;

  logic       in;
  logic [2:0] st;
  logic       pbit;

  parity_bit_logic dut (.in_i(in), .state_i(st), .pbit_o(pbit));

  localparam logic [2:0] CODE [6] = '{3'b000, 3'b010, 3'b110, 3'b100, 3'b001, 3'b101};
  localparam string NEXT0 = "CAEFBB";
  localparam string NEXT1 = "EDDAFC";
  localparam string ODD   = "BDE";

  function automatic logic is_odd(byte c);
    for (int i = 0; i < ODD.len(); i++) if (ODD[i] == c) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(string what, logic got, logic exp);
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
      in = 1'b0; #1; check("pbit0", pbit, is_odd(NEXT0[s]));
      in = 1'b1; #1; check("pbit1", pbit, is_odd(NEXT1[s]));
    end
    for (int u = 0; u < 2; u++) begin
      st = (u == 0) ? 3'b011 : 3'b111;
      for (int x = 0; x < 2; x++) begin
        in = 1'(x); #1; check("unused", pbit, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_parity_checker: exhaustive check of the parity checker XOR tree at the
// widths it is used at (3 state lines, and 3 + 1 with the parity flip-flop)
// and at a wider, uneven width. The expected parity is counted bit by bit.
module tb_parity_checker;
  int checks = 0;
  int failures = 0;

  logic [2:0] l3;  logic t3;
  logic [3:0] l4;  logic t4;
  logic [6:0] l7;  logic t7;

  parity_checker               u3 (.lines_i(l3), .to_o(t3));
  parity_checker #(.WIDTH(4))  u4 (.lines_i(l4), .to_o(t4));
  parity_checker #(.WIDTH(7))  u7 (.lines_i(l7), .to_o(t7));

  function automatic logic count_odd(logic [31:0] v, int w);
    int ones = 0;
    for (int i = 0; i < w; i++) if (v[i]) ones++;
    return logic'(ones % 2);
  endfunction

  task automatic check(string what, logic got, logic exp, int v);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s lines=%b got %b expected %b", what, v, got, exp);
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
    for (int v = 0; v < 8; v++) begin
      l3 = 3'(v); #1; check("w3", t3, count_odd(v, 3), v);
    end
    for (int v = 0; v < 16; v++) begin
      l4 = 4'(v); #1; check("w4", t4, count_odd(v, 4), v);
    end
    for (int v = 0; v < 128; v++) begin
      l7 = 7'(v); #1; check("w7", t7, count_odd(v, 7), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pcdft_m2_full: the machine at its default parameters (plain scheme,
// M2 with the M2a codes) runs its complete functional test: reset, then
// the 13 vectors 0000110101110 that traverse all 12 transitions once, and
// one more observation of TO. Every cycle the output and TO are compared
// with the fault-free responses listed below, and the machine must end in
// state C (code 110). The expected responses were worked out by hand from
// the transition table and the state codes.
module tb_pcdft_m2_full;
  int checks = 0;
  int failures = 0;

  localparam string SEQ     = "0000110101110";
  // Per vector: Mealy output, and TO (parity of the present state code).
  // States visited: A C E B A E F B D F C D A, then C.
  localparam string EXP_OUT = "1010101111111";
  localparam string EXP_TO  = "0011010110010";

  logic clk = 1'b0;
  logic rst;
  logic in;
  logic out, to;

  pcdft_m2 dut (.clk_i(clk), .rst_i(rst), .in_i(in), .out_o(out), .to_o(to));

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp, int i);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s vector %0d got %b expected %b", what, i, got, exp);
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
    int cycles;
    rst = 1'b1; in = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    cycles = 0;
    for (int i = 0; i < SEQ.len(); i++) begin
      in = (SEQ[i] == "1");
      #1;
      check("out", out, EXP_OUT[i] == "1", i);
      check("to",  to,  EXP_TO[i] == "1", i);
      @(negedge clk);
      cycles++;
    end
    #1;
    check("final_to", to, 1'b0, SEQ.len());
    check("final_state_C", dut.state_q == 3'b110, 1'b1, SEQ.len());
    // Test length: transitions plus one.
    check("test_length", cycles == 12 + 1, 1'b1, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_state_reg: checks the register's synchronous reset to its RESET_VALUE
// and that it loads its input on every rising clock edge, at the state
// register's width and at the one-bit width of the parity flip-flop.
module tb_state_reg;
  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst;
  logic [2:0] d3, q3;
  logic       d1, q1;

  state_reg #(.WIDTH(3), .RESET_VALUE(3'b101)) u3 (.clk_i(clk), .rst_i(rst), .d_i(d3), .q_o(q3));
  state_reg #(.WIDTH(1), .RESET_VALUE(1'b1))   u1 (.clk_i(clk), .rst_i(rst), .d_i(d1), .q_o(q1));

  always #5 clk = ~clk;

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp3;
    logic       exp1;
    rst = 1'b1; d3 = 3'b010; d1 = 1'b0;
    @(posedge clk); #1;
    check("reset3", q3, 3'b101);
    check("reset1", {2'b0, q1}, 3'b001);
    rst = 1'b0;
    for (int i = 0; i < 40; i++) begin
      exp3 = 3'($urandom);
      exp1 = 1'($urandom);
      d3 = exp3; d1 = exp1;
      @(posedge clk); #1;
      check("load3", q3, exp3);
      check("load1", {2'b0, q1}, {2'b0, exp1});
      d3 = ~exp3;  // changing d between edges must not reach q
      #2;
      check("no_transparency", q3, exp3);
    end
    rst = 1'b1;
    @(posedge clk); #1;
    check("reset3_again", q3, 3'b101);
    check("reset1_again", {2'b0, q1}, 3'b001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

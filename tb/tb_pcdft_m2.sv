// tb_pcdft_m2: end-to-end test of the parity-checker DFT machine M2.
//
// 1. Functional test: from reset, the 13-vector sequence 0000110101110
//    walks every one of M2's 12 transitions once and then reveals the last
//    one. The outputs and TO of the plain (CED=0) and the concurrent-error-
//    detection (CED=1) versions are compared with a reference model kept
//    here (transition table and even/odd grouping written out as strings).
// 2. Single-state-transition fault campaign: 60 copies of each version run
//    the same sequence, each with one transition sent to one of the five
//    wrong states. Every fault must show on out or TO of the plain version
//    (the test sequence detects all 60), and the CED version must raise TO
//    exactly for the faults whose wrong state has the opposite parity.
// 3. Random run with resets, against the reference model.
// 4. Transient upsets: one state bit is flipped as it is captured; the CED
//    version must raise TO, and reset must clear it.
// Mechanisms counted (each must happen): transitions covered, TO seen at 0
// and at 1 on the plain version, CED alarms on faults and on upsets, resets
// in the middle of a run.
module tb_pcdft_m2;
  import m2_pkg::*;

  int checks = 0;
  int failures = 0;

  localparam int NF = 60;
  localparam string SEQ   = "0000110101110";
  localparam string NEXT0 = "CAEFBB";
  localparam string NEXT1 = "EDDAFC";
  localparam string OUT0  = "100111";
  localparam string OUT1  = "111101";
  localparam string ODD   = "BDE";
  localparam logic [2:0] CODE [6] = '{3'b000, 3'b010, 3'b110, 3'b100, 3'b001, 3'b101};

  logic clk = 1'b0;
  logic rst;
  logic in;

  always #5 clk = ~clk;

  // Fault f: transition (state f/10, input (f/5)%2) goes to the (f%5)-th
  // state other than its correct destination.
  function automatic table_t fault_table(int f);
    table_t t = M2_TABLE;
    int s = f / 10;
    int x = (f / 5) % 2;
    int k = f % 5;
    int good = int'(t[s][x].next);
    int w = (k < good) ? k : k + 1;
    t[s][x].next = state_e'(w);
    return t;
  endfunction

  logic g0_out, g0_to, g1_out, g1_to;

  pcdft_m2 g0 (.clk_i(clk), .rst_i(rst), .in_i(in), .out_o(g0_out), .to_o(g0_to));
  pcdft_m2 #(.CED(1'b1)) g1 (.clk_i(clk), .rst_i(rst), .in_i(in), .out_o(g1_out), .to_o(g1_to));

  logic [NF-1:0] fp_out, fp_to, fc_out, fc_to;

  for (genvar f = 0; f < NF; f++) begin : g_fault
    pcdft_m2 #(.CED(1'b0), .TABLE(fault_table(f))) fp (
      .clk_i(clk), .rst_i(rst), .in_i(in), .out_o(fp_out[f]), .to_o(fp_to[f]));
    pcdft_m2 #(.CED(1'b1), .TABLE(fault_table(f))) fc (
      .clk_i(clk), .rst_i(rst), .in_i(in), .out_o(fc_out[f]), .to_o(fc_to[f]));
  end

  // ---- reference model ----
  int ref_state;  // 0..5 for A..F

  function automatic int next_of(int s, logic x);
    return x ? int'(NEXT1[s] - "A") : int'(NEXT0[s] - "A");
  endfunction
  function automatic logic out_of(int s, logic x);
    return x ? (OUT1[s] == "1") : (OUT0[s] == "1");
  endfunction
  function automatic logic odd_state(int s);
    for (int i = 0; i < ODD.len(); i++) if (int'(ODD[i] - "A") == s) return 1'b1;
    return 1'b0;
  endfunction

  // ---- mechanism counters ----
  int n_trans_covered;
  bit covered [6][2];
  int n_to_high, n_to_low, n_fault_alarm, n_upset_alarm, n_mid_resets;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1; in = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    ref_state = 0;
  endtask

  // Apply one vector at a falling edge, check the good machines before the
  // rising edge, and advance the model.
  task automatic step(logic x);
    in = x;
    #1;
    check("g0_out", g0_out, out_of(ref_state, x));
    check("g0_to",  g0_to,  odd_state(ref_state));
    check("g1_out", g1_out, out_of(ref_state, x));
    check("g1_to",  g1_to,  1'b0);
    if (g0_to) n_to_high++; else n_to_low++;
    if (!covered[ref_state][x]) begin
      covered[ref_state][x] = 1'b1;
      n_trans_covered++;
    end
    @(negedge clk);
    ref_state = next_of(ref_state, x);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NF-1:0] detected, alarm;
    int n_detected, n_expected_alarm;

    // ---- 1 + 2: functional test sequence and SST fault campaign ----
    detected = '0;
    alarm    = '0;
    @(negedge clk);
    do_reset();
    for (int i = 0; i < SEQ.len(); i++) begin
      in = (SEQ[i] == "1");
      #1;
      detected |= (fp_out ^ {NF{g0_out}}) | (fp_to ^ {NF{g0_to}});
      alarm    |= fc_to;
      step(SEQ[i] == "1");
    end
    // Observation of TO after the last vector.
    #1;
    detected |= fp_to ^ {NF{g0_to}};
    alarm    |= fc_to;
    check("final_state_C", g0.state_q == 3'b110, 1'b1);
    check("final_to", g0_to, 1'b0);
    check("all_transitions", n_trans_covered == 12, 1'b1);

    n_detected = 0;
    n_expected_alarm = 0;
    for (int f = 0; f < NF; f++) begin
      int s, good, w;
      logic x, exp_alarm;
      s = f / 10;
      x = logic'((f / 5) % 2);
      good = next_of(s, x);
      w = (f % 5 < good) ? f % 5 : f % 5 + 1;
      exp_alarm = odd_state(w) != odd_state(good);
      check($sformatf("sst_detected_%0d", f), detected[f], 1'b1);
      check($sformatf("ced_alarm_%0d", f), alarm[f], exp_alarm);
      if (detected[f]) n_detected++;
      if (exp_alarm) n_expected_alarm++;
      if (alarm[f]) n_fault_alarm++;
    end
    $display("SST faults detected by the 13-vector sequence: %0d of %0d", n_detected, NF);
    $display("CED alarms: %0d (expected %0d)", n_fault_alarm, n_expected_alarm);
    check("expected_alarm_count", n_expected_alarm == 36, 1'b1);

    // ---- 3: random run with resets ----
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 99) == 0) begin
        do_reset();
        n_mid_resets++;
        check("reset_to_A", g0.state_q == CODE[0], 1'b1);
      end
      step(1'($urandom));
      checks++;
      if (g0.state_q !== CODE[ref_state]) begin
        failures++;
        $display("FAIL state %b expected %b", g0.state_q, CODE[ref_state]);
      end
    end

    // ---- 4: transient upsets on the CED version ----
    for (int u = 0; u < 20; u++) begin
      logic [2:0] flip;
      logic       seen;
      do_reset();
      repeat ($urandom_range(0, 5)) step(1'($urandom));
      flip = 3'b001 << $urandom_range(0, 2);
      in = 1'($urandom);
      #1;
      force g1.state_d = g1.u_logic.next_o ^ flip;
      @(posedge clk);
      #1;
      release g1.state_d;
      seen = g1_to;
      check("upset_alarm", seen, 1'b1);
      if (seen) n_upset_alarm++;
      @(negedge clk);
      rst = 1'b1;
      @(posedge clk); #1;
      check("alarm_cleared_by_reset", g1_to, 1'b0);
      rst = 1'b0;
      @(negedge clk);
      ref_state = 0;
    end

    $display("mechanisms: transitions=%0d to_high=%0d to_low=%0d fault_alarms=%0d upset_alarms=%0d mid_resets=%0d",
             n_trans_covered, n_to_high, n_to_low, n_fault_alarm, n_upset_alarm, n_mid_resets);
    checks++; if (n_trans_covered != 12) failures++;
    checks++; if (n_to_high == 0)        failures++;
    checks++; if (n_to_low == 0)         failures++;
    checks++; if (n_fault_alarm == 0)    failures++;
    checks++; if (n_upset_alarm == 0)    failures++;
    checks++; if (n_mid_resets == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

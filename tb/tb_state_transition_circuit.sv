// tb_state_transition_circuit: drives the twelve-state test rule set (see
// mnfau_tb_pkg) with detection vectors computed directly from the input text:
// bit i is set when transition string i ends at the character. The match
// outputs, one clock later, are compared with a reference matcher written
// from the five regular expressions. Random inputs, stalls and restarts;
// every rule must match at least once, and the '^' and '$' anchors must each
// suppress a match at least once.
module tb_state_transition_circuit;
  import mnfau_pkg::*;
  import mnfau_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, sop = 0, eop = 0;
  logic [TB_U-1:0] det = '0, active;
  logic [TB_RULES-1:0] match;
  logic match_valid;
  int checks = 0, failures = 0, stalls = 0, inputs = 0;
  int rule_hits [TB_RULES];
  int sop_blocked = 0, eop_blocked = 0;

  state_transition_circuit #(.U(TB_U), .N_RULES(TB_RULES), .CFG(TB_CFG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run_input(byte c[$]);
    logic [TB_RULES-1:0] exp;
    bit anywhere_get;
    inputs++;
    for (int t = 0; t < c.size(); t++) begin
      while ($urandom_range(5) == 0) begin
        @(negedge clk);
        en = 0;
        stalls++;
        @(posedge clk);
        #1 check(match_valid, 0, "match_valid in stall");
      end
      @(negedge clk);
      en  = 1;
      sop = (t == 0);
      eop = (t == c.size() - 1);
      for (int i = 0; i < TB_U; i++) det[i] = str_ends(i, c, t);
      for (int r = 0; r < TB_RULES; r++) begin
        exp[r] = ref_match(r, c, t, eop);
        if (exp[r]) rule_hits[r]++;
      end
      if (t >= 3 && c[t-2] == "G" && c[t-1] == "E" && c[t] == "T") sop_blocked++;
      if (!eop && t >= 1 && c[t] == "W" && c[t-1] == "Z") eop_blocked++;
      @(posedge clk);
      #1;
      check(match_valid, 1, "match_valid");
      check(match, exp, $sformatf("match input %0d char %0d", inputs, t));
    end
    @(negedge clk);
    en = 0;
  endtask

  initial begin
    byte c[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // The document's example, then directed cases for each rule.
    run_input('{"A", "A", "B", "A", "D"});
    run_input('{"G", "E", "T", "X", "Y", "W"});
    run_input('{"Q", "G", "E", "T", "Z", "W", "Q"});
    run_input('{"C", "K", "C", "5", "K", "A", "B", "Q", "C", "D"});
    run_input('{"Z", "W"});
    for (int n = 0; n < 400; n++) begin
      rand_input(c, $urandom_range(1, 40));
      run_input(c);
    end
    for (int r = 0; r < TB_RULES; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin
        failures++;
        $display("rule %0d never matched", r);
      end
    end
    checks++;
    if (stalls == 0 || sop_blocked == 0 || eop_blocked == 0) begin
      failures++;
      $display("stalls=%0d sop_blocked=%0d eop_blocked=%0d", stalls, sop_blocked, eop_blocked);
    end
    $display("inputs %0d stalls %0d, rule hits %0d %0d %0d %0d %0d, anchors blocked ^:%0d $:%0d",
             inputs, stalls, rule_hits[0], rule_hits[1], rule_hits[2], rule_hits[3], rule_hits[4],
             sop_blocked, eop_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

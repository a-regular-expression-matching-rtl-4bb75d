// tb_mnfau_many_rules: the matcher with a larger rule set, 40 rules of the
// form "P.*Q" (120 MNFAU states, see mnfau_tb_pkg), as a step towards the
// rule-set sizes the architecture is meant for. The detection DFA of the 120
// transition strings is built and loaded as in tb_mnfau_matcher, random
// inputs over A..D are streamed with stalls, and every per-character match
// vector is compared, two clocks later, with a brute-force search for each
// rule. Every rule must match at least once.
module tb_mnfau_many_rules;
  import mnfau_pkg::*;
  import mnfau_tb_pkg::*;
  localparam int unsigned STATE_W = 10;
  localparam state_cfg_t [MR_U-1:0] CFG = mr_cfg();
  logic clk = 0, rst_n = 0, in_valid = 0, in_sop = 0, in_eop = 0;
  logic [7:0] in_char = '0;
  logic [STATE_W+7:0] sram_addr;
  logic [STATE_W-1:0] sram_rdata;
  logic dec_we = 0;
  logic [STATE_W-1:0] dec_waddr = '0;
  logic [MR_U-1:0] dec_wdata = '0;
  logic [MR_RULES-1:0] match;
  logic match_valid;

  int checks = 0, failures = 0, stalls = 0;
  longint cycle = 0;
  int rule_hits [MR_RULES];
  logic [MR_RULES-1:0] exp_q [$];
  longint cyc_q [$];
  logic [MR_RULES-1:0] exp_now;

  mnfau_matcher #(.STATE_W(STATE_W), .U(MR_U), .N_RULES(MR_RULES), .CFG(CFG)) dut (.*);
  sram_model #(.ADDR_W(STATE_W + 8), .DATA_W(STATE_W)) u_sram (.addr(sram_addr), .rdata(sram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      exp_q.push_back(exp_now);
      cyc_q.push_back(cycle);
    end
    if (rst_n && match_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
      end else begin
        if (match !== exp_q[0] || cycle != cyc_q[0] + 2) begin
          failures++;
          if (failures < 10) $display("cycle %0d: match %h expected %h", cycle, match, exp_q[0]);
        end
        void'(exp_q.pop_front());
        void'(cyc_q.pop_front());
      end
    end
  end

  task automatic send(byte c[$]);
    for (int t = 0; t < c.size(); t++) begin
      while ($urandom_range(6) == 0) begin
        @(negedge clk);
        in_valid = 0;
        stalls++;
      end
      @(negedge clk);
      in_valid = 1;
      in_sop = (t == 0);
      in_eop = (t == c.size() - 1);
      in_char = c[t];
      for (int r = 0; r < int'(MR_RULES); r++) begin
        exp_now[r] = mr_ref(r, c, t);
        if (exp_now[r]) rule_hits[r]++;
      end
    end
  endtask

  initial begin
    ac_dfa a = new();
    cset_t cls[$];
    byte c[$];
    int missed = 0;
    for (int i = 0; i < int'(MR_U); i++) begin
      mr_string(i, cls);
      a.add_string(cls);
    end
    a.build();
    $display("detection DFA: %0d states for %0d strings", a.nstates(), MR_U);
    checks++;
    if (a.nstates() > 2**STATE_W) begin
      failures++;
      $display("DFA does not fit");
    end
    for (int s = 0; s < a.nstates(); s++)
      for (int ch_ = 0; ch_ < 256; ch_++)
        u_sram.mem[s*256 + ch_] = STATE_W'(a.delta[s*256 + ch_]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < a.nstates(); s++) begin
      @(negedge clk);
      dec_we = 1; dec_waddr = STATE_W'(s); dec_wdata = a.det[s][MR_U-1:0];
    end
    @(negedge clk);
    dec_we = 0;
    for (int n = 0; n < 400; n++) begin
      c = {};
      for (int i = $urandom_range(2, 40); i > 0; i--) c.push_back(byte'(8'h41 + $urandom_range(3)));
      send(c);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    for (int r = 0; r < int'(MR_RULES); r++) if (rule_hits[r] == 0) missed++;
    checks++;
    if (missed != 0 || stalls == 0) begin
      failures++;
      $display("%0d rules never matched, stalls %0d", missed, stalls);
    end
    $display("stalls %0d, rules never matched %0d", stalls, missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

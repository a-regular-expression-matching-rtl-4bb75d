// tb_mnfau_matcher: end-to-end test of the matcher with the five-rule,
// twelve-state test rule set (see mnfau_tb_pkg).
//
// The testbench builds the detection DFA of the twelve transition strings,
// writes its transition function into the SRAM model and its detection
// vectors into the decoder through the configuration port, then streams
// inputs back to back with random stalls. Every character must produce a
// match_valid exactly two clocks later, and the match vector must equal the
// reference matcher written from the regular expressions. Counted mechanisms,
// each of which must occur: stalls, input restarts, a match of every rule,
// a '^' and a '$' anchor suppressing a match, several strings detected by one
// AC-DFA state, and a transition string longer than one character.
module tb_mnfau_matcher;
  import mnfau_pkg::*;
  import mnfau_tb_pkg::*;
  localparam int unsigned STATE_W = 10;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sop = 0, in_eop = 0;
  logic [7:0] in_char = '0;
  logic [STATE_W+7:0] sram_addr;
  logic [STATE_W-1:0] sram_rdata;
  logic dec_we = 0;
  logic [STATE_W-1:0] dec_waddr = '0;
  logic [TB_U-1:0] dec_wdata = '0;
  logic [TB_RULES-1:0] match;
  logic match_valid;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int stalls = 0, restarts = 0, multi_det = 0, long_str = 0, sop_blocked = 0, eop_blocked = 0;
  int rule_hits [TB_RULES];
  logic [TB_RULES-1:0] exp_q [$];
  longint cyc_q [$];
  logic [TB_RULES-1:0] exp_now;
  int chars = 0;
  bit drive_done = 0;

  mnfau_matcher #(.STATE_W(STATE_W), .U(TB_U), .N_RULES(TB_RULES), .CFG(TB_CFG)) dut (.*);
  sram_model #(.ADDR_W(STATE_W + 8), .DATA_W(STATE_W)) u_sram (.addr(sram_addr), .rdata(sram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: one result per character, two clocks after it.
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
        $display("unexpected match_valid at cycle %0d", cycle);
      end else begin
        if (match !== exp_q[0] || cycle != cyc_q[0] + 2) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: match %b expected %b (char of cycle %0d)", cycle, match, exp_q[0], cyc_q[0]);
        end
        void'(exp_q.pop_front());
        void'(cyc_q.pop_front());
      end
    end
    if (rst_n && dut.s1_valid && $countones(dut.det) > 1) multi_det++;
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
      if (in_sop) restarts++;
      for (int r = 0; r < TB_RULES; r++) begin
        exp_now[r] = ref_match(r, c, t, in_eop);
        if (exp_now[r]) rule_hits[r]++;
      end
      if (exp_now[0] || exp_now[1] || exp_now[4]) long_str++;
      if (t >= 3 && c[t-2] == "G" && c[t-1] == "E" && c[t] == "T") sop_blocked++;
      if (!in_eop && t >= 1 && c[t] == "W" && c[t-1] == "Z") eop_blocked++;
      chars++;
    end
  endtask

  initial begin
    ac_dfa a = new();
    cset_t cls[$];
    byte c[$];
    longint t0, t1;
    for (int i = 0; i < TB_U; i++) begin
      tb_string(i, cls);
      a.add_string(cls);
    end
    a.build();
    $display("detection DFA: %0d states for %0d strings", a.nstates(), TB_U);
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
      dec_we = 1; dec_waddr = STATE_W'(s); dec_wdata = a.det[s][TB_U-1:0];
    end
    @(negedge clk);
    dec_we = 0;
    t0 = cycle;
    send('{"A", "A", "B", "A", "D"});
    send('{"G", "E", "T", "X", "Y", "W"});
    send('{"Q", "G", "E", "T", "Z", "W", "Q"});
    send('{"C", "K", "C", "5", "K", "A", "B", "Q", "C", "D"});
    send('{"A", "A", "A", "B", "B", "D", "A", "B", "Z", "W"});
    for (int n = 0; n < 300; n++) begin
      rand_input(c, $urandom_range(1, 40));
      send(c);
    end
    @(negedge clk);
    in_valid = 0;
    t1 = cycle;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    // One character per clock: the stream took chars + stalls cycles, plus the
    // cycle that ends it.
    checks++;
    if (t1 - t0 != longint'(chars + stalls + 1)) begin
      failures++;
      $display("throughput: %0d cycles for %0d chars and %0d stalls", t1 - t0, chars, stalls);
    end
    for (int r = 0; r < TB_RULES; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin
        failures++;
        $display("rule %0d never matched", r);
      end
    end
    checks++;
    if (stalls == 0 || restarts == 0 || multi_det == 0 || long_str == 0 || sop_blocked == 0 ||
        eop_blocked == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("chars %0d, stalls %0d, restarts %0d, multi-detections %0d, long-string matches %0d",
             chars, stalls, restarts, multi_det, long_str);
    $display("rule hits %0d %0d %0d %0d %0d, anchors blocked ^:%0d $:%0d",
             rule_hits[0], rule_hits[1], rule_hits[2], rule_hits[3], rule_hits[4], sop_blocked, eop_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

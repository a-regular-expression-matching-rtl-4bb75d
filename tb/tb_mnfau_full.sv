// tb_mnfau_full: the matcher with every parameter at its default: 14-bit
// AC-DFA state (a 2^22-word transition SRAM), 8-bit characters and the
// example rule "A+[AB]{3}D". Loads the detection DFA of the strings "A" and
// "[AB][AB][AB]D", scans the example input "AABAD" and random inputs over
// A, B, D and Q with stalls, and checks every match two clocks after its
// character against a reference matcher for the expression.
module tb_mnfau_full;
  import mnfau_pkg::*;
  import mnfau_tb_pkg::*;
  localparam int unsigned STATE_W = AC_STATE_W;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sop = 0, in_eop = 0;
  logic [7:0] in_char = '0;
  logic [STATE_W+7:0] sram_addr;
  logic [STATE_W-1:0] sram_rdata;
  logic dec_we = 0;
  logic [STATE_W-1:0] dec_waddr = '0;
  logic [EX_U-1:0] dec_wdata = '0;
  logic [EX_RULES-1:0] match;
  logic match_valid;

  int checks = 0, failures = 0, hits = 0, stalls = 0;
  longint cycle = 0;
  logic exp_q [$];
  longint cyc_q [$];
  logic exp_now;

  mnfau_matcher dut (.*);
  sram_model #(.ADDR_W(STATE_W + 8), .DATA_W(STATE_W)) u_sram (.addr(sram_addr), .rdata(sram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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
        if (match[0] !== exp_q[0] || cycle != cyc_q[0] + 2) begin
          failures++;
          if (failures < 10) $display("cycle %0d: match %b expected %b", cycle, match, exp_q[0]);
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
      exp_now = ref_match(0, c, t, in_eop);
      if (exp_now) hits++;
    end
  endtask

  initial begin
    ac_dfa a = new();
    cset_t cls[$];
    byte c[$];
    string alpha = "ABDQ";
    for (int i = 0; i < EX_U; i++) begin
      tb_string(i, cls);
      a.add_string(cls);
    end
    a.build();
    $display("detection DFA: %0d states", a.nstates());
    for (int s = 0; s < a.nstates(); s++)
      for (int ch_ = 0; ch_ < 256; ch_++)
        u_sram.mem[s*256 + ch_] = STATE_W'(a.delta[s*256 + ch_]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < a.nstates(); s++) begin
      @(negedge clk);
      dec_we = 1; dec_waddr = STATE_W'(s); dec_wdata = a.det[s][EX_U-1:0];
    end
    @(negedge clk);
    dec_we = 0;
    send('{"A", "A", "B", "A", "D"});
    send('{"B", "A", "B", "A", "D", "Q", "A", "A", "A", "A", "A", "D", "B", "B", "B", "D"});
    for (int n = 0; n < 300; n++) begin
      c = {};
      for (int i = $urandom_range(1, 30); i > 0; i--) c.push_back(alpha[$urandom_range(3)]);
      send(c);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || hits == 0 || stalls == 0) begin
      failures++;
      $display("left %0d, hits %0d, stalls %0d", exp_q.size(), hits, stalls);
    end
    $display("matches %0d, stalls %0d", hits, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

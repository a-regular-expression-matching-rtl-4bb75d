// tb_acdfa_sequencer: runs the AC-DFA machine against the SRAM model loaded
// with the detection DFA of the strings "A" and "[AB][AB][AB]D". Random
// characters, stalls and input restarts; the reference walks the same DFA
// table in the testbench. Checks the memory address, the state register, the
// delayed character flags, and one character per clock.
module tb_acdfa_sequencer;
  import mnfau_tb_pkg::*;
  localparam int unsigned STATE_W = 6;
  localparam int unsigned CHR_W   = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sop = 0, in_eop = 0;
  logic [CHR_W-1:0] in_char = '0;
  logic [STATE_W+CHR_W-1:0] mem_addr;
  logic [STATE_W-1:0] mem_rdata, next_state, state;
  logic out_valid, out_sop, out_eop;
  int checks = 0, failures = 0, stalls = 0, restarts = 0;

  acdfa_sequencer #(.STATE_W(STATE_W), .CHR_W(CHR_W), .INIT_STATE('0)) dut (.*);
  sram_model #(.ADDR_W(STATE_W + CHR_W), .DATA_W(STATE_W)) u_sram (.addr(mem_addr), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    ac_dfa a = new();
    cset_t cls[$];
    int s = 0, ns;
    bit v, sp, ep;
    logic [7:0] c;
    int idx;
    tb_string(0, cls); a.add_string(cls);
    tb_string(1, cls); a.add_string(cls);
    a.build();
    if (a.nstates() > 2**STATE_W) begin
      failures++;
      $display("DFA has %0d states", a.nstates());
    end
    for (int st = 0; st < a.nstates(); st++)
      for (int ch_ = 0; ch_ < 256; ch_++)
        u_sram.mem[st*256 + ch_] = STATE_W'(a.delta[st*256 + ch_]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      v  = ($urandom_range(4) != 0);
      sp = ($urandom_range(30) == 0);
      ep = ($urandom_range(30) == 0);
      c  = ($urandom_range(1) == 0) ? 8'("A" + $urandom_range(3)) : 8'($urandom);
      in_valid = v; in_sop = sp; in_eop = ep; in_char = c;
      #1;
      check(state, s, "state");
      check(mem_addr, {(sp ? STATE_W'(0) : STATE_W'(s)), c}, "mem_addr");
      idx = (sp ? 0 : s) * 256 + int'(c);
      ns = a.delta[idx];
      check(next_state, ns, "next_state");
      if (!v) stalls++;
      if (v && sp) restarts++;
      @(posedge clk);
      if (v) s = ns;
      #1;
      check(out_valid, v, "out_valid");
      check(out_sop, v & sp, "out_sop");
      check(out_eop, v & ep, "out_eop");
    end
    checks++;
    if (stalls == 0 || restarts == 0) begin
      failures++;
      $display("stalls=%0d restarts=%0d", stalls, restarts);
    end
    $display("DFA states %0d, stalls %0d, restarts %0d", a.nstates(), stalls, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mnfau_state_cell: checks one MNFAU state cell with a string of length 3.
// Random source activity, detections, stalls and input restarts drive it;
// the reference keeps the OR of the sources for every processed character and
// predicts active_d = det AND (enable of PLEN-1 characters earlier) AND
// (at least PLEN-1 characters of this input seen), and the flip-flop.
module tb_mnfau_state_cell;
  import mnfau_pkg::*;
  localparam int unsigned PLEN = 3;
  logic clk = 0, rst_n = 0, en = 0, det = 0;
  logic [PLEN_W-1:0] pos = '0;
  logic [FANIN-1:0] src_act = '0;
  logic active_d, active;
  logic exp_active = 0;
  int checks = 0, failures = 0, hits = 0;
  bit hist[$];

  mnfau_state_cell #(.PLEN(PLEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    bit e;
    int p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(active, exp_active, "active");
      en  = ($urandom_range(4) != 0);
      if ($urandom_range(40) == 0) p = 0;
      pos = PLEN_W'(p);
      src_act = FANIN'($urandom_range(15)) & {FANIN{$urandom_range(2) == 0}};
      det = ($urandom_range(1) == 1);
      #1;
      if (p >= PLEN - 1 && hist.size() >= PLEN - 1) begin
        e = det && hist[hist.size() - (PLEN - 1)];
        check(active_d, e, "active_d");
        if (e) hits++;
      end else if (p < PLEN - 1) begin
        e = 0;
        check(active_d, 0, "active_d masked");
      end else e = active_d;
      @(posedge clk);
      if (en) begin
        hist.push_back(|src_act);
        exp_active = e;
        p = (p < 255) ? p + 1 : p;
      end
    end
    checks++;
    if (hits == 0) begin
      failures++;
      $display("the cell never became active");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

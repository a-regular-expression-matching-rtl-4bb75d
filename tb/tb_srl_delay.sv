// tb_srl_delay: checks that q is d delayed by DEPTH enabled clocks, with the
// register holding when ce is low. Random d and ce; the reference is a queue
// of the values shifted in. Outputs are checked once DEPTH values have been
// shifted in (before that the register holds its power-up contents).
module tb_srl_delay;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, ce = 0, d = 0, q;
  int checks = 0, failures = 0;
  bit hist[$];

  srl_delay #(.DEPTH(DEPTH)) dut (.clk(clk), .ce(ce), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ce = ($urandom_range(3) != 0);
      d  = $urandom_range(1);
      if (hist.size() >= DEPTH) begin
        checks++;
        if (q !== hist[hist.size() - DEPTH]) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: q=%0b expected %0b", n, q, hist[hist.size()-DEPTH]);
        end
      end
      @(posedge clk);
      if (ce) hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

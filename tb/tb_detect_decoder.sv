// tb_detect_decoder: fills the decoder RAM with random words, then reads
// random addresses with random read enables and checks the registered read
// data (one clock latency, held while rd_en is low) against a copy of the
// contents. Writes continue during the reads, including to the address
// being read, which must return the old word.
module tb_detect_decoder;
  localparam int unsigned ADDR_W = 6;
  localparam int unsigned DATA_W = 12;
  logic clk = 0, rd_en = 0, we = 0;
  logic [ADDR_W-1:0] rd_addr = '0, waddr = '0;
  logic [DATA_W-1:0] wdata = '0, rd_data;
  logic [DATA_W-1:0] ref_mem [2**ADDR_W];
  logic [DATA_W-1:0] exp_data;
  int checks = 0, failures = 0;

  detect_decoder #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit started = 0;
    for (int a = 0; a < 2**ADDR_W; a++) begin
      @(negedge clk);
      we = 1; waddr = ADDR_W'(a); wdata = DATA_W'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (started) begin
        checks++;
        if (rd_data !== exp_data) begin
          failures++;
          if (failures < 10) $display("read %0d: got %h expected %h", n, rd_data, exp_data);
        end
      end
      rd_en   = ($urandom_range(3) != 0);
      rd_addr = ADDR_W'($urandom);
      we      = ($urandom_range(3) == 0);
      waddr   = ($urandom_range(1) == 0) ? rd_addr : ADDR_W'($urandom);
      wdata   = DATA_W'($urandom);
      if (rd_en) begin
        exp_data = ref_mem[rd_addr];
        started  = 1;
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

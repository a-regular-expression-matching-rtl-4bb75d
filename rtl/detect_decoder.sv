// detect_decoder: on-chip memory that turns the AC-DFA state number into the
// U-bit detection signal of the state transition circuit.
//
// Word a holds, for AC-DFA state a, one bit per MNFAU state: set when
// reaching state a means that the transition string of that MNFAU state has
// just been read (counting strings found through failure paths too). The
// contents come from the rule compiler and are written through the
// configuration port; the design keeps them in a RAM (block RAM on an FPGA).
//
// Timing: synchronous read. rd_data shows word rd_addr one clock after
// rd_en; it holds while rd_en is low. A write and a read of the same address
// in one cycle return the old word. Write-port configuration and read-enable
// are this design's choices.
module detect_decoder #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 2
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we)    mem[waddr] <= wdata;
    if (rd_en) rd_data    <= mem[rd_addr];
  end

endmodule

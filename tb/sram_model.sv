// sram_model: behavioural model of the off-chip SRAM that stores the AC-DFA
// transition function. Asynchronous (flow-through) read: rdata follows addr
// within the cycle. Testbenches load it by writing mem directly, which stands
// for the configuration path of the real chip. Words never written hold
// random values and must not be read.
module sram_model #(
  parameter int unsigned ADDR_W = 22,
  parameter int unsigned DATA_W = 14
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];
  assign rdata = mem[addr];
endmodule

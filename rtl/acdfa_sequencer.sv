// acdfa_sequencer: the machine of the Aho-Corasick DFA that detects the
// transition strings.
//
// A register holds the present AC-DFA state. The transition function lives in
// an external memory (off-chip SRAM) addressed by {present state, character};
// the word read back is the next state, loaded into the register at the end
// of the cycle, so one character is scanned per clock. At the first character
// of an input (in_sop) the transition is taken from INIT_STATE instead of the
// register, so every input is scanned from the root of the AC-DFA.
//
// Timing: the memory is read asynchronously within the cycle (a flow-through
// SRAM): mem_addr depends on the register and the current character, and
// mem_rdata must be valid before the next clock edge. next_state is
// mem_rdata, passed on so the decoder can read it in the same edge.
// out_valid/out_sop/out_eop are the character flags delayed to line up with
// state. Without in_valid the register holds (a stall). The reset value and
// the restart at in_sop are this design's choices.
module acdfa_sequencer
  import mnfau_pkg::*;
#(
  parameter int unsigned         STATE_W    = AC_STATE_W,
  parameter int unsigned         CHR_W      = CHAR_W,
  parameter logic [STATE_W-1:0]  INIT_STATE = '0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_sop,
  input  logic                     in_eop,
  input  logic [CHR_W-1:0]         in_char,
  output logic [STATE_W+CHR_W-1:0] mem_addr,
  input  logic [STATE_W-1:0]       mem_rdata,
  output logic [STATE_W-1:0]       next_state,
  output logic [STATE_W-1:0]       state,
  output logic                     out_valid,
  output logic                     out_sop,
  output logic                     out_eop
);

  assign mem_addr   = {(in_sop ? INIT_STATE : state), in_char};
  assign next_state = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= INIT_STATE;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid & in_sop;
      out_eop   <= in_valid & in_eop;
      if (in_valid) state <= mem_rdata;
    end
  end

endmodule

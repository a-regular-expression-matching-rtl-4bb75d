// mnfau_matcher: regular expression matcher built on a decomposed MNFAU.
//
// The rule set is compiled into a modular NFA with unbounded string
// transitions (MNFAU): chains of NFA states without epsilon transitions are
// merged into one state whose transition is a whole string. The MNFAU is then
// split in two:
//   * transition string detection: an Aho-Corasick DFA over all transition
//     strings. Its transition function sits in an off-chip SRAM (the sram_*
//     ports); acdfa_sequencer holds the present state and reads the next one
//     for every character.
//   * detect_decoder: an on-chip RAM that maps each AC-DFA state to the U-bit
//     detection vector, one bit per MNFAU state.
//   * state_transition_circuit: one cell per MNFAU state, with shift
//     registers that line each string transition up with its detection, and
//     OR gates for the epsilon transitions. It raises match[r] for rule r.
//
// Interface: one character per clock on in_char with in_valid; in_sop marks
// the first and in_eop the last character of an input (a packet). in_valid
// low stalls the whole pipeline. The SRAM is read asynchronously within the
// cycle (flow-through): sram_addr = {AC state, character}, sram_rdata = next
// AC state. The decoder RAM is loaded through dec_we/dec_waddr/dec_wdata
// before matching starts; the SRAM is loaded by whatever owns it.
//
// Timing: match and match_valid for a character appear two clocks after the
// character was presented (one for the SRAM/decoder stage, one for the state
// transition circuit). Throughput is one character per clock. An assertion
// checks that latency. Its disable condition samples rst_n on the clock, and
// that is the only synchronous use of rst_n: lint reports that rst_n is used
// both as a synchronous and as an asynchronous signal, and that report is
// about the assertion, not the circuit.
//
// Defaults: 8-bit characters and a 14-bit AC state as in the document's
// 1,114-rule implementation; the rule set is the document's example
// "A+[AB]{3}D" (mnfau_pkg::EX_CFG), since a real rule set is data that a
// compiler generates per application.
module mnfau_matcher
  import mnfau_pkg::*;
#(
  parameter int unsigned         STATE_W    = AC_STATE_W,
  parameter int unsigned         U          = EX_U,
  parameter int unsigned         N_RULES    = EX_RULES,
  parameter state_cfg_t [U-1:0]  CFG        = EX_CFG,
  parameter logic [STATE_W-1:0]  INIT_STATE = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // character stream
  input  logic                      in_valid,
  input  logic                      in_sop,
  input  logic                      in_eop,
  input  logic [CHAR_W-1:0]         in_char,
  // off-chip SRAM holding the AC-DFA transition function
  output logic [STATE_W+CHAR_W-1:0] sram_addr,
  input  logic [STATE_W-1:0]        sram_rdata,
  // decoder RAM configuration
  input  logic                      dec_we,
  input  logic [STATE_W-1:0]        dec_waddr,
  input  logic [U-1:0]              dec_wdata,
  // results
  output logic [N_RULES-1:0]        match,
  output logic                      match_valid
);

  logic [STATE_W-1:0] next_state;
  logic [STATE_W-1:0] ac_state;
  logic               s1_valid, s1_sop, s1_eop;
  logic [U-1:0]       det;
  logic [U-1:0]       active;

  acdfa_sequencer #(
    .STATE_W    (STATE_W),
    .CHR_W      (CHAR_W),
    .INIT_STATE (INIT_STATE)
  ) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_sop     (in_sop),
    .in_eop     (in_eop),
    .in_char    (in_char),
    .mem_addr   (sram_addr),
    .mem_rdata  (sram_rdata),
    .next_state (next_state),
    .state      (ac_state),
    .out_valid  (s1_valid),
    .out_sop    (s1_sop),
    .out_eop    (s1_eop)
  );

  detect_decoder #(
    .ADDR_W (STATE_W),
    .DATA_W (U)
  ) u_dec (
    .clk     (clk),
    .rd_en   (in_valid),
    .rd_addr (next_state),
    .rd_data (det),
    .we      (dec_we),
    .waddr   (dec_waddr),
    .wdata   (dec_wdata)
  );

  state_transition_circuit #(
    .U       (U),
    .N_RULES (N_RULES),
    .CFG     (CFG)
  ) u_stc (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (s1_valid),
    .sop         (s1_sop),
    .eop         (s1_eop),
    .det         (det),
    .active      (active),
    .match       (match),
    .match_valid (match_valid)
  );

  // One result per character, exactly two clocks after it.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              match_valid == $past(in_valid, 2))
    else $error("match_valid does not follow in_valid by two clocks");

endmodule

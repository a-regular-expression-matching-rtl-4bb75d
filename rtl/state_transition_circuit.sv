// state_transition_circuit: the NFA half of the decomposed MNFAU.
//
// One mnfau_state_cell per MNFAU state, wired by the transitions listed in
// CFG (see mnfau_pkg). For every character the AC-DFA delivers a U-bit
// detection vector det; bit i says that the transition string of state i
// ends at this character. Each cell combines it with the activity of its
// source states, delayed by the string length, so the cascade follows the
// MNFAU one character per clock. An accepting state reports its rule on the
// match vector; a rule with '$' is reported only when the character is the
// last of the input (eop).
//
// Initial state: SRC_INIT is active before every character (the rule may
// start anywhere); SRC_SOP only before the first character of an input ('^').
// At the first character the activity of all states, left over from the
// previous input, is ignored.
//
// Timing: en, sop, eop and det belong to one character. match and
// match_valid are registered and appear in the next cycle. Without en the
// circuit holds its state (a stall).
module state_transition_circuit
  import mnfau_pkg::*;
#(
  parameter int unsigned             U       = EX_U,
  parameter int unsigned             N_RULES = EX_RULES,
  parameter state_cfg_t [U-1:0]      CFG     = EX_CFG
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               sop,
  input  logic               eop,
  input  logic [U-1:0]       det,
  output logic [U-1:0]       active,
  output logic [N_RULES-1:0] match,
  output logic               match_valid
);

  logic [PLEN_W-1:0] pos_q;    // index of the next character in the input
  logic [PLEN_W-1:0] pos;      // index of the current character
  logic              first;    // current character starts an input
  logic [U-1:0]      active_d;

  assign first = sop || (pos_q == '0);
  assign pos   = sop ? '0 : pos_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  pos_q <= '0;
    else if (en && pos != '1)    pos_q <= pos + 1'b1;
    else if (en)                 pos_q <= pos;
  end

  // Activity of a source slot after the previous character.
  function automatic logic src_value(src_t s, logic [U-1:0] act, logic first_c);
    if (s == SRC_INIT)     return 1'b1;
    else if (s == SRC_SOP) return first_c;
    for (int j = 0; j < U; j++) if (s == src_t'(j)) return act[j] & ~first_c;
    return 1'b0;
  endfunction

  for (genvar i = 0; i < U; i++) begin : g_state
    logic [FANIN-1:0] src_act;
    // The table must describe a valid MNFAU: a non-empty string and sources
    // that name existing states.
    if (CFG[i].plen == 0) begin : g_bad_plen
      $error("state %0d has an empty transition string", i);
    end
    for (genvar k = 0; k < FANIN; k++) begin : g_chk_src
      localparam int S = int'($signed(CFG[i].src[k]));
      if (S >= int'(U) || S < int'(SRC_SOP)) begin : g_bad_src
        $error("state %0d source %0d is out of range", i, k);
      end
    end
    always_comb begin
      for (int k = 0; k < FANIN; k++) src_act[k] = src_value(CFG[i].src[k], active, first);
    end
    mnfau_state_cell #(.PLEN(int'(CFG[i].plen))) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (en),
      .pos      (pos),
      .src_act  (src_act),
      .det      (det[i]),
      .active_d (active_d[i]),
      .active   (active[i])
    );
  end

  logic [N_RULES-1:0] match_d;
  always_comb begin
    match_d = '0;
    for (int i = 0; i < U; i++) begin
      for (int r = 0; r < N_RULES; r++) begin
        if (CFG[i].rule == src_t'(r) && (!CFG[i].at_end || eop)) match_d[r] = match_d[r] | active_d[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match       <= '0;
      match_valid <= 1'b0;
    end else begin
      match_valid <= en;
      match       <= en ? match_d : '0;
    end
  end

endmodule

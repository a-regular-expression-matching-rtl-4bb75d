// mnfau_pkg: types and constants shared by the decomposed-MNFAU regular
// expression matcher.
//
// The matcher splits a modular NFA with unbounded string transitions (MNFAU)
// into two parts: an Aho-Corasick DFA that detects the transition strings,
// and a state transition circuit with one cell per MNFAU state. The shape of
// the state transition circuit depends on the rule set, so it is described by
// a packed array of state_cfg_t records, one per MNFAU state, that a rule
// compiler produces together with the AC-DFA tables:
//   plen   : length p of the state's transition string; the cell delays its
//            enable by p clocks so that it lines up with the AC-DFA detection.
//   src    : up to FANIN states (or an initial state) whose activity enables
//            this state. Epsilon transitions are folded into these lists.
//   rule   : the rule reported when the state is active (SRC_NONE: none).
//   at_end : the rule carries '$' and is reported only on the last character.
// The 8-bit character follows the document; FANIN, the source encoding and the
// record layout are choices of this design.
package mnfau_pkg;

  localparam int unsigned CHAR_W = 8;   // one character is 8 bits
  localparam int unsigned FANIN  = 4;   // incoming transitions per MNFAU state
  localparam int unsigned PLEN_W = 8;   // width of a transition string length

  typedef logic signed [15:0] src_t;

  // Source codes besides a state number 0..U-1.
  localparam src_t SRC_NONE = -16'sd1;  // unused source slot
  localparam src_t SRC_INIT = -16'sd2;  // initial state, active before every character
  localparam src_t SRC_SOP  = -16'sd3;  // '^': initial state active only before the first character

  typedef struct packed {
    logic [PLEN_W-1:0] plen;
    src_t [FANIN-1:0]  src;
    src_t              rule;
    logic              at_end;
  } state_cfg_t;

  function automatic state_cfg_t state_cfg(int plen, int s0, int s1 = -1, int s2 = -1,
                                           int s3 = -1, int rule = -1, bit at_end = 1'b0);
    state_cfg_t c;
    c.plen   = PLEN_W'(plen);
    c.src[0] = src_t'(s0);
    c.src[1] = src_t'(s1);
    c.src[2] = src_t'(s2);
    c.src[3] = src_t'(s3);
    c.rule   = src_t'(rule);
    c.at_end = at_end;
    return c;
  endfunction

  // Width of the AC-DFA state register: ceil(log2 q) = 14 for the 10,066-state
  // AC-DFA of the 1,114-rule implementation.
  localparam int unsigned AC_STATE_W = 14;

  // Default rule set: the worked example "A+[AB]{3}D". Its MNFAU has two
  // states besides the initial one: state 0 with string "A" and a self loop
  // (A+), and state 1 with the merged string "[AB][AB][AB]D" (p = 4).
  localparam int unsigned EX_U     = 2;
  localparam int unsigned EX_RULES = 1;
  localparam state_cfg_t [EX_U-1:0] EX_CFG = {
    state_cfg(4, 0, -1, -1, -1, 0),          // state 1: [AB][AB][AB]D, accepts rule 0
    state_cfg(1, int'(SRC_INIT), 0)          // state 0: A, entered from s0 or itself
  };

endpackage

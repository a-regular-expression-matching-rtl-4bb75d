// mnfau_tb_pkg: testbench helpers for the decomposed-MNFAU matcher.
//
// ac_dfa builds the detection DFA for a list of transition strings, each a
// sequence of character classes (256-bit masks). A DFA state is the set of
// string positions that have just been matched; state 0 is the empty set and
// is the root. From set S on character c the next set holds position 0 of
// every string whose first class contains c, and position k+1 of a string
// when position k is in S and class k+1 contains c. A string is detected in a
// state that holds its last position. This yields the same detections as an
// Aho-Corasick automaton with failure paths, computed without building one.
// The tables are written into the SRAM model and the decoder.
package mnfau_tb_pkg;
  import mnfau_pkg::*;

  typedef logic [255:0] cset_t;
  localparam int MAXPOS = 512;
  typedef logic [MAXPOS-1:0] pset_t;

  function automatic cset_t ch(byte c);
    cset_t m = '0;
    m[c] = 1'b1;
    return m;
  endfunction

  function automatic cset_t rng(byte lo, byte hi);
    cset_t m = '0;
    for (int c = int'(lo); c <= int'(hi); c++) m[c] = 1'b1;
    return m;
  endfunction

  class ac_dfa;
    cset_t pos_cls[$];
    int    pos_str[$];
    bit    pos_first[$];
    bit    pos_last[$];
    int    nstr;
    pset_t sets[$];
    int    ids[string];     // keyed by the hex text of a position set
    int    delta[$];        // delta[s*256 + c]
    logic [MAXPOS-1:0] det[$]; // detected strings per state

    function new();
      nstr = 0;
    endfunction

    function void add_string(cset_t cls[$]);
      foreach (cls[k]) begin
        pos_cls.push_back(cls[k]);
        pos_str.push_back(nstr);
        pos_first.push_back(k == 0);
        pos_last.push_back(k == cls.size() - 1);
      end
      nstr++;
    endfunction

    // Convenience: a literal string.
    function void add_literal(string s);
      cset_t cls[$];
      for (int i = 0; i < s.len(); i++) cls.push_back(ch(s[i]));
      add_string(cls);
    endfunction

    function void build();
      pset_t nxt;
      logic [MAXPOS-1:0] d;
      string key;
      sets.push_back('0);
      ids[$sformatf("%h", pset_t'(0))] = 0;
      for (int s = 0; s < sets.size(); s++) begin
        for (int c = 0; c < 256; c++) begin
          nxt = '0;
          for (int p = 0; p < pos_cls.size(); p++)
            if (pos_cls[p][c] && (pos_first[p] || sets[s][p-1])) nxt[p] = 1'b1;
          key = $sformatf("%h", nxt);
          if (!ids.exists(key)) begin
            ids[key] = sets.size();
            sets.push_back(nxt);
          end
          delta.push_back(ids[key]);
        end
        d = '0;
        for (int p = 0; p < pos_cls.size(); p++)
          if (pos_last[p] && sets[s][p]) d[pos_str[p]] = 1'b1;
        det.push_back(d);
      end
    endfunction

    function int nstates();
      return sets.size();
    endfunction
  endclass


  // ---------------------------------------------------------------------
  // Test rule set (five rules, twelve MNFAU states):
  //   rule 0  A+[AB]{3}D    states 0 "A" (self loop), 1 "[AB][AB][AB]D"
  //   rule 1  ^GET          state  2 "GET", anchored at the start
  //   rule 2  (XY|Z)W$      states 3 "XY", 4 "Z", 5 "W" (end anchored)
  //   rule 3  C[0-9]?K      states 6 "C", 7 "[0-9]", 8 "K" (skip by epsilon)
  //   rule 4  AB.*CD        states 9 "AB", 10 "." (self loop), 11 "CD"
  // The default rule set of the matcher is rule 0 alone (states 0 and 1).
  localparam int unsigned TB_U     = 12;
  localparam int unsigned TB_RULES = 5;
  localparam state_cfg_t [TB_U-1:0] TB_CFG = {
    state_cfg(2, 9, 10, -1, -1, 4),             // 11 CD
    state_cfg(1, 9, 10),                        // 10 .
    state_cfg(2, int'(SRC_INIT)),               //  9 AB
    state_cfg(1, 6, 7, -1, -1, 3),              //  8 K
    state_cfg(1, 6),                            //  7 [0-9]
    state_cfg(1, int'(SRC_INIT)),               //  6 C
    state_cfg(1, 3, 4, -1, -1, 2, 1'b1),        //  5 W $
    state_cfg(1, int'(SRC_INIT)),               //  4 Z
    state_cfg(2, int'(SRC_INIT)),               //  3 XY
    state_cfg(3, int'(SRC_SOP), -1, -1, -1, 1), //  2 GET
    state_cfg(4, 0, -1, -1, -1, 0),             //  1 [AB][AB][AB]D
    state_cfg(1, int'(SRC_INIT), 0)             //  0 A
  };

  function automatic void tb_string(int i, ref cset_t cls[$]);
    cset_t ab = ch("A") | ch("B");
    cls = {};
    case (i)
      0:  cls = {ch("A")};
      1:  cls = {ab, ab, ab, ch("D")};
      2:  cls = {ch("G"), ch("E"), ch("T")};
      3:  cls = {ch("X"), ch("Y")};
      4:  cls = {ch("Z")};
      5:  cls = {ch("W")};
      6:  cls = {ch("C")};
      7:  cls = {rng("0", "9")};
      8:  cls = {ch("K")};
      9:  cls = {ch("A"), ch("B")};
      10: cls = {'1};
      11: cls = {ch("C"), ch("D")};
      default: cls = {};
    endcase
  endfunction

  // Does transition string i end at character t of the input c?
  function automatic bit str_ends(int i, const ref byte c[$], int t);
    cset_t cls[$];
    tb_string(i, cls);
    if (t - cls.size() + 1 < 0) return 0;
    foreach (cls[k]) if (!cls[k][unsigned'(c[t - cls.size() + 1 + k])]) return 0;
    return 1;
  endfunction

  function automatic bit is_ab(byte x);
    return x == "A" || x == "B";
  endfunction

  // Reference matcher, written from the regular expressions themselves:
  // does rule r match a substring that ends at character t of input c?
  function automatic bit ref_match(int r, const ref byte c[$], int t, bit last);
    case (r)
      0: return t >= 4 && c[t] == "D" && is_ab(c[t-1]) && is_ab(c[t-2]) && is_ab(c[t-3]) &&
                c[t-4] == "A";
      1: return t == 2 && c[0] == "G" && c[1] == "E" && c[2] == "T";
      2: return last && t >= 1 && c[t] == "W" &&
                (c[t-1] == "Z" || (t >= 2 && c[t-2] == "X" && c[t-1] == "Y"));
      3: return t >= 1 && c[t] == "K" &&
                (c[t-1] == "C" || (t >= 2 && c[t-1] >= "0" && c[t-1] <= "9" && c[t-2] == "C"));
      4: begin
        if (!(t >= 3 && c[t-1] == "C" && c[t] == "D")) return 0;
        for (int s = 0; s <= t - 3; s++) if (c[s] == "A" && c[s+1] == "B") return 1;
        return 0;
      end
      default: return 0;
    endcase
  endfunction

  // A random input biased towards the rule characters.
  function automatic void rand_input(ref byte c[$], input int len);
    string alpha = "ABDGETXYZWCK05Q";
    c = {};
    for (int i = 0; i < len; i++) c.push_back(alpha[$urandom_range(alpha.len() - 1)]);
  endfunction

  // ---------------------------------------------------------------------
  // Many-rule set: MR_RULES rules "P.*Q" with literal parts P and Q of two
  // to four characters over A..D, taken from a fixed formula so that the
  // state table can be a constant. Rule r uses states 3r ("P", from the
  // initial state), 3r+1 (".", self loop) and 3r+2 ("Q", accepting).
  localparam int unsigned MR_RULES = 40;
  localparam int unsigned MR_U     = 3 * MR_RULES;

  function automatic int mr_len(int r, int part);
    return 2 + ((r * 7 + part * 5 + (r >> 1)) % 3);
  endfunction

  function automatic byte mr_char(int r, int part, int k);
    int h = r * 131 + part * 71 + k * 37 + r * k * 17;
    h = h ^ (h >> 3) ^ (h >> 6);
    return byte'(8'h41 + (h % 4));
  endfunction

  function automatic state_cfg_t [MR_U-1:0] mr_cfg();
    state_cfg_t [MR_U-1:0] c;
    for (int r = 0; r < int'(MR_RULES); r++) begin
      c[3*r]   = state_cfg(mr_len(r, 0), int'(SRC_INIT));
      c[3*r+1] = state_cfg(1, 3*r, 3*r+1);
      c[3*r+2] = state_cfg(mr_len(r, 1), 3*r, 3*r+1, -1, -1, r);
    end
    return c;
  endfunction

  function automatic void mr_string(int i, ref cset_t cls[$]);
    int r = i / 3;
    cls = {};
    case (i % 3)
      0: for (int k = 0; k < mr_len(r, 0); k++) cls.push_back(ch(mr_char(r, 0, k)));
      1: cls = {'1};
      default: for (int k = 0; k < mr_len(r, 1); k++) cls.push_back(ch(mr_char(r, 1, k)));
    endcase
  endfunction

  // Does literal part `part` of rule r end at character t?
  function automatic bit mr_part_ends(int r, int part, const ref byte c[$], int t);
    int n = mr_len(r, part);
    if (t - n + 1 < 0) return 0;
    for (int k = 0; k < n; k++) if (c[t - n + 1 + k] != mr_char(r, part, k)) return 0;
    return 1;
  endfunction

  // Reference for rule r = P.*Q: Q ends at t and P ends at or before the
  // character just ahead of Q.
  function automatic bit mr_ref(int r, const ref byte c[$], int t);
    if (!mr_part_ends(r, 1, c, t)) return 0;
    for (int s = 0; s <= t - mr_len(r, 1); s++) if (mr_part_ends(r, 0, c, s)) return 1;
    return 0;
  endfunction

endpackage

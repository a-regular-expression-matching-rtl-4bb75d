// mnfau_state_cell: one state of the MNFAU in the state transition circuit.
//
// The cell ORs its incoming transitions (the activity of its source states
// after the previous character), delays that enable by the length PLEN of its
// transition string, and ANDs it with the AC-DFA detection signal for the
// string. The result is kept in the state flip-flop. With PLEN = 1 this is the
// flip-flop-and-AND cell of a single-character NFA; for PLEN > 1 a shift
// register of PLEN-1 stages precedes the AND, so the transition takes PLEN
// clocks in all, as the document describes.
//
// After a new input starts the shift register still holds enables of the old
// input. Instead of clearing it (a LUT shift register has no reset) the cell
// ignores its output until PLEN-1 characters of the new input have been seen:
// pos is the index of the current character within the input. That masking is
// this design's choice.
//
// Timing: en marks a cycle that carries the detection for one character;
// active is updated at the end of that cycle and shows the state after it.
module mnfau_state_cell
  import mnfau_pkg::*;
#(
  parameter int unsigned PLEN = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,      // one character processed this cycle
  input  logic [PLEN_W-1:0] pos,     // index of that character in the input
  input  logic [FANIN-1:0]  src_act, // sources active after the previous character
  input  logic              det,     // AC-DFA detected this state's string
  output logic              active_d,// next value of the state (combinational)
  output logic              active   // state flip-flop
);

  logic enable_in;
  logic enable_dly;
  logic hist_ok;

  assign enable_in = |src_act;

  if (PLEN <= 1) begin : g_direct
    assign enable_dly = enable_in;
    assign hist_ok    = 1'b1;
  end else begin : g_srl
    srl_delay #(.DEPTH(PLEN - 1)) u_srl (
      .clk (clk),
      .ce  (en),
      .d   (enable_in),
      .q   (enable_dly)
    );
    assign hist_ok = (32'(pos) >= PLEN - 1);
  end

  assign active_d = det & enable_dly & hist_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  active <= 1'b0;
    else if (en) active <= active_d;
  end

endmodule

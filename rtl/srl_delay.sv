// srl_delay: DEPTH-stage shift register with clock enable.
//
// In the state transition circuit a string transition of length p takes p
// clocks, while the AC-DFA detects the string one character per clock. A
// shift register between two MNFAU states holds each enable until the
// detection of the matching string arrives. The register has no reset, like
// a LUT in shift-register mode (SRL16 on the Xilinx parts the design targets),
// so a DEPTH of up to 16 maps onto one LUT; the state cell masks the stale
// contents after a new input starts.
//
// Interface: d is shifted in on a rising clk edge when ce is high; q is d
// delayed by DEPTH enabled clocks. DEPTH must be at least 1.
module srl_delay #(
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic ce,
  input  logic d,
  output logic q
);

  logic [DEPTH-1:0] sr;

  if (DEPTH == 1) begin : g_one
    always_ff @(posedge clk) if (ce) sr <= d;
  end else begin : g_many
    always_ff @(posedge clk) if (ce) sr <= {sr[DEPTH-2:0], d};
  end

  assign q = sr[DEPTH-1];

endmodule

// pll_mixer: phase detector of the numerical PLL. The selected reference
// (PU sum or external RF) is multiplied by the local-oscillator square wave
// from the phase table, whose level is +1, -1 (lo_neg) or 0 (lo_en low).
// With the LO positive just before and negative just after the expected
// bunch centre, the product averages to zero when the beam is centred and
// has the sign of the timing error otherwise. Mixing follows the original system;
// the three-level LO is this design's choice. Timing: prod is registered,
// one clock after the inputs.
module pll_mixer #(
  parameter int IN_W = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] ref_in,
  input  logic                   lo_en,
  input  logic                   lo_neg,
  output logic signed [IN_W:0]   prod
);
  logic signed [IN_W:0] ext;
  assign ext = (IN_W+1)'(ref_in);

  always_ff @(posedge clk) begin
    if (!rst_n)      prod <= '0;
    else if (!lo_en) prod <= '0;
    else if (lo_neg) prod <= -ext;
    else             prod <= ext;
  end
endmodule

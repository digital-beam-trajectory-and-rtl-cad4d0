// dds: direct digital synthesizer of the numerical PLL.
// A PHASE_W-bit phase accumulator advances by the frequency tuning word
// every clock, so one full accumulator wrap is one beam revolution:
// f_rev = ftw / 2^PHASE_W * f_clk. The upper phase bits address the phase
// table, which turns the phase into LO, gate and baseline-window timing.
// rev_tick is high for the one clock in which the phase wrapped.
// The DDS and its role follow the original system; the accumulator width and the
// revolution tick are this design's choices. Timing: phase and rev_tick are
// registered, one clock after ftw is applied.
module dds #(
  parameter int PHASE_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] ftw,
  output logic [PHASE_W-1:0] phase,
  output logic               rev_tick
);
  logic [PHASE_W:0] nxt;
  assign nxt = {1'b0, phase} + {1'b0, ftw};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= '0;
      rev_tick <= 1'b0;
    end else begin
      phase    <= nxt[PHASE_W-1:0];
      rev_tick <= nxt[PHASE_W];
    end
  end
endmodule

// loop_filter: low-pass filter and controller of the numerical PLL.
// A one-pole IIR low-pass (time constant 2^LPF_SHIFT clocks) averages the
// mixer output; lp holds that average scaled by 2^LPF_SHIFT. A
// proportional-integral controller then sets the DDS frequency word:
//   ftw = f0 + (lp*kp) >>> 12 + (sum(lp)*ki) >>> 28
// The PI zero and the low-pass pole together give the pole/zero loop of the
// original system; the integrator lets the loop follow the frequency
// sweep of acceleration with no steady phase error. ftw is clamped to
// [fmin, fmax] and the integrator stops growing (anti-windup) while clamped.
// clear resets the filter state. The structure (low pass then frequency
// control) follows the original system; the PI form, scaling and clamps are this
// design's choices. Timing: ftw is registered; three clocks from err to ftw.
module loop_filter #(
  parameter int ERR_W     = 15,
  parameter int LPF_SHIFT = 8,
  parameter int PHASE_W   = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic signed [ERR_W-1:0] err,
  input  logic [PHASE_W-1:0]      f0,
  input  logic [PHASE_W-1:0]      fmin,
  input  logic [PHASE_W-1:0]      fmax,
  input  logic [15:0]             kp,
  input  logic [15:0]             ki,
  output logic [PHASE_W-1:0]      ftw,
  output logic                    at_limit
);
  localparam int LP_W  = ERR_W + LPF_SHIFT + 2;
  localparam int INT_W = 48;
  localparam int SUM_W = PHASE_W + 8;

  logic signed [LP_W-1:0]  lp;
  logic signed [INT_W-1:0] integ;
  logic signed [SUM_W-1:0] prop, iterm, total;

  // low-pass pole
  always_ff @(posedge clk) begin
    if (!rst_n || clear) lp <= '0;
    else lp <= lp + LP_W'(err) - (lp >>> LPF_SHIFT);
  end

  // integral path with anti-windup
  always_ff @(posedge clk) begin
    if (!rst_n || clear) integ <= '0;
    else if (!(at_limit && ((lp > 0) == (total > 0))))
      integ <= integ + INT_W'(lp);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      prop  <= '0;
      iterm <= '0;
    end else begin
      prop  <= SUM_W'((64'(lp) * $signed({1'b0, kp})) >>> 12);
      iterm <= SUM_W'((80'(integ) * $signed({1'b0, ki})) >>> 28);
    end
  end

  assign total = prop + iterm;

  logic signed [SUM_W-1:0] raw;
  assign raw = $signed({8'd0, f0}) + total;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      ftw      <= f0;
      at_limit <= 1'b0;
    end else if (raw < $signed({8'd0, fmin})) begin
      ftw      <= fmin;
      at_limit <= 1'b1;
    end else if (raw > $signed({8'd0, fmax})) begin
      ftw      <= fmax;
      at_limit <= 1'b1;
    end else begin
      ftw      <= raw[PHASE_W-1:0];
      at_limit <= 1'b0;
    end
  end
endmodule

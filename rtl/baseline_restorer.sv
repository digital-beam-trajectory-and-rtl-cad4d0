// baseline_restorer: removes the baseline droop of an AC-coupled pick-up
// signal (one instance each for sum, horizontal and vertical difference).
// Correction filter: the PU behaves as a first-order high pass with time
// constant 2^droop_shift samples; adding back the running sum of the input
// scaled by 2^-droop_shift inverts it exactly:
//   out = x + (acc >>> droop_shift),  acc += x
// Switched DC restorer: inside the BLR window, where no bunch is present and
// the output should be zero, the accumulator is also pulled by
// (out << droop_shift) >>> blr_shift, so the output baseline is driven to
// zero with a per-sample gain of 2^-blr_shift. This removes ADC offsets and
// keeps the accumulator from running away (saturation protection); the
// accumulator is also clamped. With corr_en low the output is the input,
// unchanged. The filter/restorer pair follows the original system; the
// first-order model, its fixed-point form and the gains are this design's.
// Timing: out is registered, one clock after x.
module baseline_restorer #(
  parameter int IN_W  = 14,
  parameter int OUT_W = 18,
  parameter int ACC_W = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic                    blr,
  input  logic                    corr_en,
  input  logic [4:0]              droop_shift,
  input  logic [4:0]              blr_shift,
  output logic signed [OUT_W-1:0] out,
  output logic                    clipped
);
  localparam logic signed [ACC_W-1:0] ACC_MAX = {2'b00, {(ACC_W-2){1'b1}}};
  localparam logic signed [OUT_W-1:0] OUT_MAX = {1'b0, {(OUT_W-1){1'b1}}};

  logic signed [ACC_W-1:0] acc, xe, corr, pull, acc_n;

  assign xe   = ACC_W'(x);
  assign corr = corr_en ? xe + (acc >>> droop_shift) : xe;
  assign pull = (corr <<< droop_shift) >>> blr_shift;

  always_comb begin
    acc_n = acc + xe;
    if (blr) acc_n = acc_n - pull;
    if (acc_n > ACC_MAX)       acc_n = ACC_MAX;
    else if (acc_n < -ACC_MAX) acc_n = -ACC_MAX;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !corr_en) acc <= '0;
    else                    acc <= acc_n;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out     <= '0;
      clipped <= 1'b0;
    end else if (corr > ACC_W'(OUT_MAX)) begin
      out     <= OUT_MAX;
      clipped <= 1'b1;
    end else if (corr < -ACC_W'(OUT_MAX)) begin
      out     <= -OUT_MAX;
      clipped <= 1'b1;
    end else begin
      out     <= OUT_W'(corr);
      clipped <= 1'b0;
    end
  end
endmodule

// integrator: integrates one baseline-restored channel over each gate.
// While gate is high the input samples are summed; on the clock after the
// gate falls the sum is presented on result with valid high for one clock,
// and the next gate starts from zero. One result is produced per bunch, so
// a phase table with h gates per turn gives h results per revolution. The
// sum saturates at the OUT_W-bit limits and sat flags that it did.
// Gate-controlled integration follows the original system; saturation is this
// design's choice. Timing: valid one clock after the last gated sample.
module integrator #(
  parameter int IN_W  = 18,
  parameter int OUT_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic                    gate,
  output logic signed [OUT_W-1:0] result,
  output logic                    valid,
  output logic                    sat
);
  localparam logic signed [OUT_W:0] MAXV = (OUT_W+1)'({1'b0, {(OUT_W-1){1'b1}}});

  logic signed [OUT_W-1:0] acc;
  logic                    gate_d, acc_sat;
  logic signed [OUT_W:0]   nxt;

  assign nxt = (OUT_W+1)'(acc) + (OUT_W+1)'(x);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      acc_sat <= 1'b0;
      gate_d  <= 1'b0;
      result  <= '0;
      valid   <= 1'b0;
      sat     <= 1'b0;
    end else begin
      gate_d <= gate;
      valid  <= 1'b0;
      if (gate) begin
        if (nxt > MAXV) begin
          acc <= OUT_W'(MAXV);  acc_sat <= 1'b1;
        end else if (nxt < -MAXV) begin
          acc <= OUT_W'(-MAXV); acc_sat <= 1'b1;
        end else begin
          acc <= OUT_W'(nxt);
        end
      end else if (gate_d) begin
        result  <= acc;
        sat     <= acc_sat;
        valid   <= 1'b1;
        acc     <= '0;
        acc_sat <= 1'b0;
      end
    end
  end
endmodule

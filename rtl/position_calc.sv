// position_calc: per-bunch beam position from the integrated signals,
//   x = S_x * Delta_x / Sigma,   y = S_y * Delta_y / Sigma
// S is an unsigned scale (S_W bits, position units per unit of Delta/Sigma);
// the result is a signed POS_W-bit position, truncated towards zero and
// saturated. Two pipelined dividers (one per plane) accept a new bunch every
// clock, so the position stream keeps pace with the integrators even at the
// highest bunch rate. A bunch whose Sigma is not positive (no beam) gives
// position 0 with no_beam set. The formula follows the original system; widths,
// scaling and the no-beam rule are this design's choices.
// Timing: POS_W+1 clocks from in_valid to out_valid.
module position_calc
  import bto_pkg::*;
#(
  parameter int S_W   = 16,
  parameter int POS_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [BUS_W-1:0] sum,
  input  logic signed [BUS_W-1:0] dx,
  input  logic signed [BUS_W-1:0] dy,
  input  logic [S_W-1:0]          sx,
  input  logic [S_W-1:0]          sy,
  output logic                    out_valid,
  output logic signed [POS_W-1:0] pos_x,
  output logic signed [POS_W-1:0] pos_y,
  output logic                    no_beam
);
  localparam int NUM_W = BUS_W + S_W;

  logic             v1, nb1, negx1, negy1;
  logic [NUM_W-1:0] nx1, ny1;
  logic [BUS_W-1:0] den1;

  // stage 1: magnitudes and products
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; nb1 <= 1'b0; negx1 <= 1'b0; negy1 <= 1'b0;
      nx1 <= '0; ny1 <= '0; den1 <= '0;
    end else begin
      v1    <= in_valid;
      nb1   <= (sum <= 0);
      negx1 <= dx[BUS_W-1];
      negy1 <= dy[BUS_W-1];
      nx1   <= NUM_W'(dx[BUS_W-1] ? BUS_W'(-dx) : BUS_W'(dx)) * NUM_W'(sx);
      ny1   <= NUM_W'(dy[BUS_W-1] ? BUS_W'(-dy) : BUS_W'(dy)) * NUM_W'(sy);
      den1  <= (sum <= 0) ? BUS_W'(1) : BUS_W'(sum);
    end
  end

  logic             vx, vy, ovx, ovy;
  logic [POS_W-2:0] qx, qy;
  logic [2:0]       tx, ty;

  pipe_divider #(.NUM_W(NUM_W), .DEN_W(BUS_W), .Q_W(POS_W-1), .TAG_W(3)) u_divx (
    .clk, .rst_n, .in_valid(v1), .num(nx1), .den(den1), .in_tag({nb1, negx1, negy1}),
    .out_valid(vx), .quot(qx), .ovf(ovx), .out_tag(tx)
  );
  pipe_divider #(.NUM_W(NUM_W), .DEN_W(BUS_W), .Q_W(POS_W-1), .TAG_W(3)) u_divy (
    .clk, .rst_n, .in_valid(v1), .num(ny1), .den(den1), .in_tag({nb1, negx1, negy1}),
    .out_valid(vy), .quot(qy), .ovf(ovy), .out_tag(ty)
  );

  logic signed [POS_W-1:0] mx, my;
  assign mx = $signed({1'b0, qx});
  assign my = $signed({1'b0, qy});

  assign out_valid = vx;
  assign no_beam   = tx[2];
  assign pos_x     = tx[2] ? '0 : (tx[1] ? -mx : mx);
  assign pos_y     = tx[2] ? '0 : (tx[0] ? -my : my);

  // both dividers run in lock step
  wire unused = vy ^ ovx ^ ovy ^ (|ty);
endmodule

// pipe_divider: fully pipelined unsigned restoring divider, one result per
// clock. Stage i decides quotient bit Q_W-1-i by trial subtraction of the
// divisor shifted to that bit. A quotient that would not fit in Q_W bits
// saturates to all ones (ovf), and a zero divisor gives ovf as well.
// A TAG_W-bit tag travels with each operand pair. Timing: Q_W+1 clocks from
// in_valid to out_valid, one operation accepted every clock. The original
// system names only the division x = Sx*dx/sum; this pipelined form is this
// design's choice, made so that closely spaced bunches never wait.
module pipe_divider #(
  parameter int NUM_W = 40,
  parameter int DEN_W = 24,
  parameter int Q_W   = 24,
  parameter int TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [Q_W-1:0]   quot,
  output logic             ovf,
  output logic [TAG_W-1:0] out_tag
);
  localparam int R_W = ((NUM_W > DEN_W + Q_W) ? NUM_W : DEN_W + Q_W) + 1;

  typedef struct packed {
    logic             v;
    logic             ovf;
    logic [R_W-1:0]   rem;
    logic [R_W-1:0]   den;
    logic [Q_W-1:0]   q;
    logic [TAG_W-1:0] tag;
  } stage_t;

  stage_t st [Q_W+1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= Q_W; i++) st[i] <= '0;
    end else begin
      st[0].v   <= in_valid;
      st[0].rem <= R_W'(num);
      st[0].den <= R_W'(den);
      st[0].q   <= '0;
      st[0].tag <= in_tag;
      st[0].ovf <= (den == '0) || (R_W'(num) >= (R_W'(den) << Q_W));
      for (int i = 1; i <= Q_W; i++) begin
        logic [R_W-1:0] sh;
        sh = st[i-1].den << (Q_W - i);
        st[i]     <= st[i-1];
        if (st[i-1].rem >= sh) begin
          st[i].rem           <= st[i-1].rem - sh;
          st[i].q[Q_W - i]    <= 1'b1;
        end
      end
    end
  end

  assign out_valid = st[Q_W].v;
  assign ovf       = st[Q_W].ovf;
  assign quot      = st[Q_W].ovf ? '1 : st[Q_W].q;
  assign out_tag   = st[Q_W].tag;
endmodule

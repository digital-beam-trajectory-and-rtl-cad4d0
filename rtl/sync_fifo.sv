// sync_fifo: single-clock first-in first-out queue of 2^AW words of W bits.
// dout shows the oldest word whenever empty is low (first-word fall-through);
// pop removes it. A push while full is ignored. count is the fill level.
// It decouples the bunch results from the SDRAM port; the original system
// does not describe this queue, so it and its depth are this design's own.
module sync_fifo #(
  parameter int W  = 128,
  parameter int AW = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [2**AW];
  logic [AW:0]   wp, rp;
  logic          do_push, do_pop;

  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign empty   = (wp == rp);
  assign count   = wp - rp;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp[AW-1:0]];

  always_ff @(posedge clk) if (do_push) mem[wp[AW-1:0]] <= din;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end
endmodule

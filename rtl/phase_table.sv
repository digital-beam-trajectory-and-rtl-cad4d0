// phase_table: double-banked timing table of the numerical PLL.
// Each bank holds one revolution of 2^PT_AW entries (bto_pkg::pt_entry_t:
// LO enable/polarity, integration gate, baseline-restoration window),
// addressed by the upper bits of the DDS phase. One bank is active and
// drives the timing; the host writes the other. A swap request (external
// harmonic-change trigger or host command) is held and takes effect at the
// next revolution start, so the beam-type pattern changes between turns and
// bunch splitting or batch compression is followed without a glitch.
// The double RAM and the three kinds of timing follow the original system; the
// depth, the entry encoding and the swap-at-turn-boundary rule are this
// design's choices. Timing: entry is registered, one clock after rd_addr;
// swapped pulses in the clock the new bank becomes active.
module phase_table
  import bto_pkg::*;
#(
  parameter int PT_AW = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PT_AW-1:0] rd_addr,
  input  logic             rev_tick,   // revolution start from the DDS
  output pt_entry_t        entry,
  input  logic             wr_en,      // host write into the idle bank
  input  logic [PT_AW-1:0] wr_addr,
  input  pt_entry_t        wr_data,
  input  logic             swap_req,   // request a bank swap
  output logic             active_bank,
  output logic             swap_pending,
  output logic             swapped
);
  pt_entry_t bank0 [2**PT_AW];
  pt_entry_t bank1 [2**PT_AW];

  always_ff @(posedge clk) begin
    if (wr_en && active_bank)  bank0[wr_addr] <= wr_data;
    if (wr_en && !active_bank) bank1[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) entry <= '0;
    else        entry <= active_bank ? bank1[rd_addr] : bank0[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_bank  <= 1'b0;
      swap_pending <= 1'b0;
      swapped      <= 1'b0;
    end else begin
      swapped <= 1'b0;
      if (rev_tick && (swap_pending || swap_req)) begin
        active_bank  <= ~active_bank;
        swap_pending <= 1'b0;
        swapped      <= 1'b1;
      end else if (swap_req) begin
        swap_pending <= 1'b1;
      end
    end
  end
endmodule

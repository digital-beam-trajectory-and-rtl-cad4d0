// numerical_pll: beam-synchronous timing generator.
// The reference (external RF before injection, PU sum after it, chosen by
// sync_select) is mixed with the LO square wave read from the phase table;
// the loop filter turns the low-passed product into the DDS frequency word,
// and the DDS phase addresses the phase table again. When locked, the
// table's integration gate and baseline-restoration (BLR) window stay at a
// fixed phase of the beam, whatever the revolution frequency does during
// acceleration. Changing the bunch pattern (harmonic number) is a swap of
// the phase-table banks at a turn boundary.
// This loop follows the original system; the settings interface, reference
// detector and table encoding are this design's own.
// Timing: gate/blr/lo come one clock after the ADC sample they belong to,
// aligned with the one-clock baseline restorer and the reference register.
module numerical_pll
  import bto_pkg::*;
#(
  parameter int PHASE_W   = 32,
  parameter int PT_AW     = 10,
  parameter int LPF_SHIFT = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_rf,
  input  logic signed [ADC_W-1:0] adc_sum,
  input  logic                    trig_inj,
  input  logic                    trig_harm,
  input  logic                    cycle_start,
  // settings
  input  logic [1:0]              sync_mode,
  input  logic [ADC_W-1:0]        det_thresh,
  input  logic [3:0]              det_count,
  input  logic [PHASE_W-1:0]      f0,
  input  logic [PHASE_W-1:0]      fmin,
  input  logic [PHASE_W-1:0]      fmax,
  input  logic [15:0]             kp,
  input  logic [15:0]             ki,
  input  logic                    loop_clear,
  input  logic                    pt_wr_en,
  input  logic [PT_AW-1:0]        pt_wr_addr,
  input  pt_entry_t               pt_wr_data,
  input  logic                    pt_swap_host,
  // timing outputs
  output pt_entry_t               timing,
  output logic                    rev_start,   // first clock of a revolution (aligned with timing)
  output logic [PHASE_W-1:0]      phase,
  output logic [PHASE_W-1:0]      ftw,
  output logic signed [ADC_W:0]   mix_out,
  output logic                    src_pu,
  output logic                    src_switched,
  output logic                    active_bank,
  output logic                    bank_swapped,
  output logic                    at_limit
);
  logic signed [ADC_W-1:0] ref_s;
  logic                    rev_tick;

  sync_select u_sel (
    .clk, .rst_n, .adc_rf, .adc_sum, .rev_tick, .trig_inj, .cycle_start,
    .mode(sync_mode), .det_thresh, .det_count,
    .ref_out(ref_s), .src_pu, .switched(src_switched)
  );

  pll_mixer #(.IN_W(ADC_W)) u_mix (
    .clk, .rst_n, .ref_in(ref_s), .lo_en(timing.lo_en), .lo_neg(timing.lo_neg),
    .prod(mix_out)
  );

  loop_filter #(.ERR_W(ADC_W+1), .LPF_SHIFT(LPF_SHIFT), .PHASE_W(PHASE_W)) u_lf (
    .clk, .rst_n, .clear(loop_clear), .err(mix_out), .f0, .fmin, .fmax, .kp, .ki,
    .ftw, .at_limit
  );

  dds #(.PHASE_W(PHASE_W)) u_dds (
    .clk, .rst_n, .ftw, .phase, .rev_tick
  );

  phase_table #(.PT_AW(PT_AW)) u_pt (
    .clk, .rst_n, .rd_addr(phase[PHASE_W-1 -: PT_AW]), .rev_tick,
    .entry(timing), .wr_en(pt_wr_en), .wr_addr(pt_wr_addr), .wr_data(pt_wr_data),
    .swap_req(trig_harm | pt_swap_host), .active_bank, .swap_pending(), .swapped(bank_swapped)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) rev_start <= 1'b0;
    else        rev_start <= rev_tick;
  end
endmodule

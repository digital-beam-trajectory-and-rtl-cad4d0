// bto_top: digital beam trajectory and orbit acquisition for one pick-up.
// The PU sum and difference signals arrive as 14-bit samples at 125 MHz.
// A numerical PLL (numerical_pll) locks a DDS to the beam revolution -
// first to the external RF, then to the PU sum once beam is seen - and
// reads gate, baseline-restoration and LO timing from a double-banked
// phase table. Three baseline restorers remove the PU droop from sum, dx
// and dy, three integrators sum each bunch inside its gate, and every bunch
// result goes both to a position calculator (x = Sx*dx/sum, y = Sy*dy/sum)
// and to a circular buffer in external SDRAM. A pointer array logs the
// buffer address at harmonic-change, injection and 1 ms events, an embedded
// logic analyser records chosen internal signals, and a register bank
// gives the host access to all of it. The SDRAM controller and the host
// processor are outside this module: their buses are ports.
// The chain of blocks follows the original system; the interfaces between them,
// the register map and the record format are this design's own.
// STATUS register bits: 0 always 1, 1 PU sum selected, 2 active table bank,
// 3 frequency at limit, 4 buffer overflow, 5 buffer wrapped, 6 host read
// busy, 7 analyser armed, 8 analyser done, 9 pointer array wrapped,
// 10 last position had no beam, 11 restorer clipped, 12 integrator
// saturated, 13 analyser trigger seen.
// Latency: sample to gate-aligned restored data 1 clock; gate end to
// buffer record queued 1 clock, to position 25 clocks.
module bto_top
  import bto_pkg::*;
#(
  parameter int PHASE_W   = 32,
  parameter int PT_AW     = 10,
  parameter int LPF_SHIFT = 8,
  parameter int MEM_AW    = 23,
  parameter int FIFO_AW   = 4,
  parameter int PTR_AW    = 12,
  parameter int LA_AW     = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ADC samples
  input  logic signed [ADC_W-1:0] adc_sum,
  input  logic signed [ADC_W-1:0] adc_dx,
  input  logic signed [ADC_W-1:0] adc_dy,
  input  logic signed [ADC_W-1:0] adc_rf,
  // external timing triggers (one-clock pulses)
  input  logic                    trig_harm,
  input  logic                    trig_inj,
  input  logic                    trig_ms,
  // host register bus
  input  logic [7:0]              host_addr,
  input  logic                    host_we,
  input  logic [31:0]             host_wdata,
  input  logic                    host_re,
  output logic [31:0]             host_rdata,
  output logic                    host_rvalid,
  // SDRAM controller port
  output logic                    mem_cmd_valid,
  input  logic                    mem_cmd_ready,
  output logic                    mem_cmd_we,
  output logic [MEM_AW-1:0]       mem_cmd_addr,
  output logic [REC_W-1:0]        mem_wdata,
  input  logic                    mem_rd_valid,
  input  logic [REC_W-1:0]        mem_rdata,
  // per-bunch position stream
  output logic                    pos_valid,
  output logic signed [BUS_W-1:0] pos_x,
  output logic signed [BUS_W-1:0] pos_y,
  output logic                    pos_no_beam,
  // timing, for observation
  output pt_entry_t               timing,
  output logic                    rev_start,
  output logic [PHASE_W-1:0]      ftw
);
  // ---------------- configuration ----------------
  logic               acq_en, corr_en, loop_clear, buf_clear, pt_swap, la_arm;
  logic               cycle_start, buf_rd_req;
  logic [1:0]         sync_mode;
  logic [PHASE_W-1:0] f0, fmin, fmax;
  logic [15:0]        kp, ki, sx, sy;
  logic [ADC_W-1:0]   det_thresh;
  logic [3:0]         det_count;
  logic [4:0]         droop_shift, blr_shift;
  logic               pt_wr_en;
  logic [PT_AW-1:0]   pt_wr_addr;
  pt_entry_t          pt_wr_data;
  logic [2:0]         la_sel_a, la_sel_b, la_trig_sel;
  logic [23:0]        la_delay;
  logic [15:0]        la_decim;
  logic [LA_AW-1:0]   la_rd_addr;
  logic [MEM_AW-1:0]  buf_rd_addr;
  logic [PTR_AW-1:0]  ptr_rd_index;

  // ---------------- PLL ----------------
  logic [PHASE_W-1:0]    phase;
  logic signed [ADC_W:0] mix_out;
  logic src_pu, src_switched, active_bank, bank_swapped, at_limit;

  numerical_pll #(.PHASE_W(PHASE_W), .PT_AW(PT_AW), .LPF_SHIFT(LPF_SHIFT)) u_pll (
    .clk, .rst_n, .adc_rf, .adc_sum, .trig_inj, .trig_harm, .cycle_start,
    .sync_mode, .det_thresh, .det_count, .f0, .fmin, .fmax, .kp, .ki, .loop_clear,
    .pt_wr_en, .pt_wr_addr, .pt_wr_data, .pt_swap_host(pt_swap),
    .timing, .rev_start, .phase, .ftw, .mix_out, .src_pu, .src_switched,
    .active_bank, .bank_swapped, .at_limit
  );

  // ---------------- baseline restoration and integration ----------------
  logic signed [SIG_W-1:0] r_sum, r_dx, r_dy;
  logic [2:0]              clip, isat, ival;
  logic signed [BUS_W-1:0] i_sum, i_dx, i_dy;

  baseline_restorer #(.IN_W(ADC_W), .OUT_W(SIG_W)) u_blr_s (
    .clk, .rst_n, .x(adc_sum), .blr(timing.blr), .corr_en, .droop_shift, .blr_shift,
    .out(r_sum), .clipped(clip[0]));
  baseline_restorer #(.IN_W(ADC_W), .OUT_W(SIG_W)) u_blr_x (
    .clk, .rst_n, .x(adc_dx), .blr(timing.blr), .corr_en, .droop_shift, .blr_shift,
    .out(r_dx), .clipped(clip[1]));
  baseline_restorer #(.IN_W(ADC_W), .OUT_W(SIG_W)) u_blr_y (
    .clk, .rst_n, .x(adc_dy), .blr(timing.blr), .corr_en, .droop_shift, .blr_shift,
    .out(r_dy), .clipped(clip[2]));

  integrator #(.IN_W(SIG_W), .OUT_W(BUS_W)) u_int_s (
    .clk, .rst_n, .x(r_sum), .gate(timing.gate), .result(i_sum), .valid(ival[0]), .sat(isat[0]));
  integrator #(.IN_W(SIG_W), .OUT_W(BUS_W)) u_int_x (
    .clk, .rst_n, .x(r_dx), .gate(timing.gate), .result(i_dx), .valid(ival[1]), .sat(isat[1]));
  integrator #(.IN_W(SIG_W), .OUT_W(BUS_W)) u_int_y (
    .clk, .rst_n, .x(r_dy), .gate(timing.gate), .result(i_dy), .valid(ival[2]), .sat(isat[2]));

  // ---------------- position ----------------
  position_calc #(.S_W(16), .POS_W(BUS_W)) u_pos (
    .clk, .rst_n, .in_valid(ival[0]), .sum(i_sum), .dx(i_dx), .dy(i_dy), .sx, .sy,
    .out_valid(pos_valid), .pos_x, .pos_y, .no_beam(pos_no_beam));

  // ---------------- circular buffer in SDRAM ----------------
  logic [MEM_AW-1:0] buf_next;
  logic              buf_wrapped, buf_overflow, buf_rd_busy, buf_rd_done;
  logic [23:0]       turn;
  logic [REC_W-1:0]  buf_rd_data;

  circular_buffer #(.MEM_AW(MEM_AW), .FIFO_AW(FIFO_AW)) u_buf (
    .clk, .rst_n, .clear(buf_clear), .acq_en, .rev_start,
    .res_valid(ival[0]), .res_sum(i_sum), .res_dx(i_dx), .res_dy(i_dy),
    .next_addr(buf_next), .wrapped(buf_wrapped), .overflow(buf_overflow), .turn,
    .rd_req(buf_rd_req), .rd_addr(buf_rd_addr), .rd_busy(buf_rd_busy),
    .rd_done(buf_rd_done), .rd_data(buf_rd_data),
    .mem_cmd_valid, .mem_cmd_ready, .mem_cmd_we, .mem_cmd_addr, .mem_wdata,
    .mem_rd_valid, .mem_rdata);

  // ---------------- pointer array ----------------
  logic [PTR_AW-1:0] ptr_wr_index;
  logic              ptr_wrapped;
  logic [31:0]       ptr_rd_data;

  pointer_array #(.MEM_AW(MEM_AW), .PTR_AW(PTR_AW)) u_ptr (
    .clk, .rst_n, .clear(buf_clear), .ev_harm(trig_harm), .ev_inj(trig_inj), .ev_ms(trig_ms),
    .buf_addr(buf_next), .wr_index(ptr_wr_index), .wrapped(ptr_wrapped),
    .rd_index(ptr_rd_index), .rd_data(ptr_rd_data));

  // ---------------- embedded logic analyser ----------------
  logic [7:0][BUS_W-1:0] probes;
  logic [7:0]            trigs;
  logic [47:0]           la_rd_data;
  logic                  la_armed, la_done, la_trig;

  assign probes[0] = BUS_W'(adc_sum);
  assign probes[1] = BUS_W'(r_sum);
  assign probes[2] = BUS_W'(timing);
  assign probes[3] = BUS_W'(mix_out);
  assign probes[4] = ftw[PHASE_W-1 -: BUS_W];
  assign probes[5] = i_sum;
  assign probes[6] = pos_x;
  assign probes[7] = BUS_W'(r_dx);
  assign trigs = {src_switched, ival[0], trig_ms, trig_harm, trig_inj, rev_start,
                  timing.blr, timing.gate};

  logic_analyser #(.NPROBE(8), .PROBE_W(BUS_W), .NTRIG(8), .LA_AW(LA_AW)) u_la (
    .clk, .rst_n, .probes, .trigs, .sel_a(la_sel_a), .sel_b(la_sel_b), .trig_sel(la_trig_sel),
    .delay(la_delay), .decim(la_decim), .arm(la_arm), .armed(la_armed), .done(la_done),
    .triggered(la_trig), .rd_addr(la_rd_addr), .rd_data(la_rd_data));

  // ---------------- host registers ----------------
  logic [31:0] status;
  assign status = {18'd0, la_trig, |isat, |clip, pos_no_beam, ptr_wrapped, la_done, la_armed,
                   buf_rd_busy, buf_wrapped, buf_overflow, at_limit, active_bank, src_pu, 1'b1};

  host_regs #(.PHASE_W(PHASE_W), .PT_AW(PT_AW), .MEM_AW(MEM_AW), .PTR_AW(PTR_AW),
              .LA_AW(LA_AW)) u_regs (
    .clk, .rst_n, .host_addr, .host_we, .host_wdata, .host_re, .host_rdata, .host_rvalid,
    .acq_en, .corr_en, .sync_mode, .loop_clear, .buf_clear, .pt_swap, .la_arm, .cycle_start,
    .buf_rd_req, .f0, .fmin, .fmax, .kp, .ki, .det_thresh, .det_count, .droop_shift,
    .blr_shift, .pt_wr_en, .pt_wr_addr, .pt_wr_data, .sx, .sy, .la_sel_a, .la_sel_b,
    .la_trig_sel, .la_delay, .la_decim, .la_rd_addr, .buf_rd_addr, .ptr_rd_index,
    .status, .ftw, .buf_next, .ptr_wr_index, .turn, .la_rd_data, .buf_rd_done,
    .buf_rd_data, .ptr_rd_data);

  wire unused = bank_swapped ^ (|phase) ^ ival[1] ^ ival[2];
endmodule

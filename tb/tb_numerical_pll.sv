// tb_numerical_pll: closed-loop test of the numerical PLL against the
// behavioural beam. The PLL first locks to the external RF, the injection
// trigger brings the beam and the reference switches to the PU sum, the
// revolution frequency then ramps up by 10 kHz, and halfway through one
// bunch pair splits into four (harmonic-change trigger, phase-table swap).
// The DDS phase is compared with the true beam phase every clock: after
// lock the mean error must stay within 4 samples (the
// gate is +-17 samples wide; pipeline alignment and ramp lag take up to 3), and the frequency
// word must follow the beam frequency.
module tb_numerical_pll;
  import bto_pkg::*;
  import tb_beam_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] adc_sum, adc_dx, adc_dy, adc_rf;
  logic trig_inj = 0, trig_harm = 0, beam_on = 0, kick = 0;
  int h_beam = 2;
  real phi, nturn, x_now;
  int turns;
  logic pt_wr_en = 0, pt_swap_host = 0;
  logic [AW-1:0] pt_wr_addr = 0;
  pt_entry_t pt_wr_data = '0, timing;
  logic rev_start, src_pu, src_switched, active_bank, bank_swapped, at_limit;
  logic [31:0] phase, ftw;
  logic signed [14:0] mix_out;
  int checks = 0, failures = 0, nswitch = 0, nswap = 0, nlocked = 0;
  always #4 clk = ~clk;

  beam_model #(.F_START(437.0e3), .F_END(447.0e3), .RAMP_TURNS(1300.0)) u_beam (
    .clk, .beam_on, .h_beam, .n_bunch(h_beam), .kick, .adc_sum, .adc_dx, .adc_dy, .adc_rf, .phi,
    .n_per_turn(nturn), .turns, .x_now);

  numerical_pll #(.PHASE_W(32), .PT_AW(AW), .LPF_SHIFT(8)) dut (
    .clk, .rst_n, .adc_rf, .adc_sum, .trig_inj, .trig_harm, .cycle_start(1'b0),
    .sync_mode(2'd0), .det_thresh(14'd1000), .det_count(4'd3),
    .f0(FTW_437K), .fmin(FTW_MIN), .fmax(FTW_MAX), .kp(KP), .ki(KI), .loop_clear(1'b0),
    .pt_wr_en, .pt_wr_addr, .pt_wr_data, .pt_swap_host,
    .timing, .rev_start, .phase, .ftw, .mix_out, .src_pu, .src_switched,
    .active_bank, .bank_swapped, .at_limit);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (src_switched) nswitch++;
    if (bank_swapped) nswap++;
  end

  // phase error in samples, modulo the bunch spacing
  real esum;
  int  ecount;
  always @(posedge clk) begin
    real e;
    e = phase / (2.0 ** 32) - phi;
    e = wrapd(e * h_beam) / h_beam * nturn;
    esum += e;
    ecount++;
  end

  task automatic load(int h);
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      pt_wr_en = 1; pt_wr_addr = AW'(i); pt_wr_data = pattern(i, AW, h);
    end
    @(negedge clk) pt_wr_en = 0;
  endtask

  // mean phase error over n turns
  task automatic measure(int n, output real m);
    int t0;
    t0 = turns;
    esum = 0; ecount = 0;
    while (turns < t0 + n) @(negedge clk);
    m = esum / ecount;
  endtask

  task automatic expect_locked(string what, int n);
    real m;
    measure(n, m);
    checks++;
    if (m > 4.0 || m < -4.0) begin
      failures++;
      $display("FAIL %s: mean phase error %f samples (turn %0d)", what, m, turns);
    end else begin
      nlocked++;
      $display("%s: mean phase error %f samples (turn %0d)", what, m, turns);
    end
  endtask

  initial begin
    real m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(2);                          // into the idle bank
    @(negedge clk) pt_swap_host = 1;
    @(negedge clk) pt_swap_host = 0;
    load(4);                          // split pattern waits in the other bank
    while (turns < 150) @(negedge clk);
    expect_locked("RF lock", 20);
    checks++;
    if (src_pu) begin failures++; $display("FAIL: PU selected before injection"); end
    @(negedge clk) begin trig_inj = 1; beam_on = 1; end
    @(negedge clk) trig_inj = 0;
    while (turns < 200) @(negedge clk);
    checks++;
    if (!src_pu || nswitch != 1) begin failures++; $display("FAIL: no switch to PU"); end
    expect_locked("PU lock", 20);
    while (turns < 600) @(negedge clk);
    expect_locked("PU lock during ramp", 50);
    // bunch splitting: harmonic-change trigger late in the turn, beam splits at the wrap
    while (phi < 0.8) @(negedge clk);
    @(negedge clk) trig_harm = 1;
    @(negedge clk) trig_harm = 0;
    while (phi > 0.5) @(negedge clk);
    h_beam = 4;
    while (turns < 720) @(negedge clk);
    checks++;
    if (nswap != 2) begin failures++; $display("FAIL: %0d bank swaps", nswap); end
    expect_locked("lock after splitting", 50);
    while (turns < 1350) @(negedge clk);
    expect_locked("lock at end of ramp", 20);
    // frequency word follows the beam: 447 kHz
    checks++;
    m = ftw * 125.0e6 / (2.0 ** 32);
    $display("DDS frequency %f Hz", m);
    if (m < 446.9e3 || m > 447.1e3) begin failures++; $display("FAIL: frequency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

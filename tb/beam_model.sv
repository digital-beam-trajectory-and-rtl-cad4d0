// beam_model: behavioural source of pick-up and RF signals, for simulation
// only. A revolution phase advances by f_rev/f_clk per clock; f_rev ramps
// linearly from F_START to F_END over RAMP_TURNS turns (acceleration). The
// RF harmonic is h_beam; the first n_bunch of its buckets hold Gaussian
// bunches (sigma SIGMA samples, sum peak 2*AMP/n_bunch counts, so the charge
// splits when n_bunch grows), bunch k centred at phase (k+0.5)/h_beam. The
// difference signals are sum*(x/S) and sum*(y/S) with a horizontal
// betatron oscillation of tune QX after each kick. All three signals pass
// through a first-order AC coupling (time constant 2^DROOP samples), get an
// ADC offset and noise, and are rounded to 14 bits. The RF reference is a
// cosine at h_beam times f_rev peaking at the bunch centres.
// beam_on gates the beam (before injection only RF is present). With
// BUNCH_TURNS > 0 the beam is injected unbunched (a constant current of the
// same charge) and bunches linearly from BUNCH_DELAY turns after injection
// over BUNCH_TURNS turns. The ramp starts at turn RAMP_START.
module beam_model #(
  parameter real F_CLK      = 125.0e6,
  parameter real F_START    = 437.0e3,
  parameter real F_END      = 447.0e3,
  parameter real RAMP_TURNS = 1000.0,
  parameter real RAMP_START = 0.0,
  parameter real BUNCH_DELAY = 0.0,
  parameter real BUNCH_TURNS = 0.0,
  parameter real AMP        = 3000.0,
  parameter real SIGMA      = 6.0,
  parameter int  DROOP      = 12,
  parameter real X_MM       = 4.0,
  parameter real Y_MM       = -2.0,
  parameter real S_MM       = 40.0,
  parameter real QX         = 0.23,
  parameter real KICK_MM    = 3.0,
  parameter real NOISE      = 3.0,
  parameter int  OFFSET     = 25
) (
  input  logic               clk,
  input  logic               beam_on,
  input  int                 h_beam,
  input  int                 n_bunch,
  input  logic               kick,
  output logic signed [13:0] adc_sum,
  output logic signed [13:0] adc_dx,
  output logic signed [13:0] adc_dy,
  output logic signed [13:0] adc_rf,
  output real                phi,        // revolution phase, turns (fractional part)
  output real                n_per_turn, // samples per revolution now
  output int                 turns,
  output real                x_now       // true horizontal position, mm
);
  localparam real PI = 3.14159265358979;
  real f, acc_s, acc_x, acc_y, kick_amp, kick_turn;
  int  t_on = -1;

  initial begin
    phi = 0.37; turns = 0; f = F_START; acc_s = 0; acc_x = 0; acc_y = 0;
    kick_amp = 0; kick_turn = 0; x_now = X_MM; n_per_turn = F_CLK / F_START;
    adc_sum = 0; adc_dx = 0; adc_dy = 0; adc_rf = 0;
  end

  function automatic logic signed [13:0] adc(real v);
    int i;
    i = $rtoi(v + (v >= 0 ? 0.5 : -0.5));
    if (i > 8191) i = 8191;
    if (i < -8192) i = -8192;
    return 14'(i);
  endfunction

  function automatic real noise();
    int r;
    r = $urandom_range(0, 2000);
    r = r - 1000;
    return NOISE * r / 577.0;
  endfunction

  always @(negedge clk) begin
    real s, d, xm, ys, ym, yx, yy;
    phi += f / F_CLK;
    if (phi >= 1.0) begin
      phi -= 1.0;
      turns++;
      if (real'(turns) >= RAMP_START && real'(turns) < RAMP_START + RAMP_TURNS)
        f = F_START + (F_END - F_START) * (turns - RAMP_START) / RAMP_TURNS;
    end
    n_per_turn = F_CLK / f;
    if (kick) begin kick_amp = KICK_MM; kick_turn = turns; end
    x_now = X_MM + kick_amp * $cos(2.0 * PI * QX * (turns - kick_turn)) *
            $exp(-(turns - kick_turn) / 300.0);
    s = 0;
    if (beam_on && t_on < 0) t_on = turns;
    if (beam_on) begin
      real b;
      b = 1.0;
      if (BUNCH_TURNS > 0.0) begin
        b = (turns - t_on - BUNCH_DELAY) / BUNCH_TURNS;
        if (b < 0.0) b = 0.0;
        if (b > 1.0) b = 1.0;
      end
      // unbunched part: the same charge spread evenly over the turn
      s = (1.0 - b) * 2.0 * AMP * SIGMA * $sqrt(2.0 * PI) / n_per_turn;
      for (int k = 0; k < n_bunch; k++) begin
        d = phi - (k + 0.5) / h_beam;
        if (d > 0.5) d -= 1.0;
        if (d < -0.5) d += 1.0;
        d = d * n_per_turn;
        if (d < 8 * SIGMA && d > -8 * SIGMA)
          s += b * (AMP * 2.0 / n_bunch) * $exp(-d * d / (2.0 * SIGMA * SIGMA));
      end
    end
    xm = s * x_now / S_MM;
    ym = s * Y_MM / S_MM;
    // AC coupling of the pick-up
    ys = s  - acc_s / (2.0 ** DROOP); acc_s += ys;
    yx = xm - acc_x / (2.0 ** DROOP); acc_x += yx;
    yy = ym - acc_y / (2.0 ** DROOP); acc_y += yy;
    adc_sum <= adc(ys + OFFSET + noise());
    adc_dx  <= adc(yx + OFFSET + noise());
    adc_dy  <= adc(yy - OFFSET + noise());
    adc_rf  <= adc(4000.0 * $cos(2.0 * PI * h_beam * (phi - 0.5 / h_beam)) + noise());
  end
endmodule

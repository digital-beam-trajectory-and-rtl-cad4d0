// tb_beam_pkg: settings shared by the closed-loop testbenches: the phase
// table pattern for bunches in the first nb of h equally spaced buckets,
// bunch k at phase (k+0.5)/h, and the PLL gains and frequency words for a
// 437 kHz revolution at 125 MHz.
// Pattern for table entry i (phase p = (i+0.5)/2^AW), with d the distance
// from p to the nearest bunch centre, in turns:
//   LO +1 for -1/(4h) <= d < 0, LO -1 for 0 <= d < 1/(4h)
//   gate for |d| < min(GATE_HW, 0.35/h)
//   BLR for |d - 1/(2h)| < 1/(8h) (after each bunch, before the next bucket)
package tb_beam_pkg;
  import bto_pkg::*;

  localparam real GATE_HW = 0.06;

  function automatic real wrapd(real d);
    while (d >= 0.5) d -= 1.0;
    while (d < -0.5) d += 1.0;
    return d;
  endfunction

  function automatic pt_entry_t pattern_nb(int i, int aw, int h, int nb);
    pt_entry_t e;
    real p, d, db, ghw;
    e = '0;
    p = (i + 0.5) / (2.0 ** aw);
    ghw = (0.35 / h < GATE_HW) ? 0.35 / h : GATE_HW;
    for (int k = 0; k < nb; k++) begin
      d  = wrapd(p - (k + 0.5) / h);
      db = wrapd(p - (k + 0.5) / h - 0.5 / h);
      if (d >= -0.25 / h && d < 0.25 / h) begin
        e.lo_en  = 1'b1;
        e.lo_neg = (d >= 0.0);
      end
      if (d > -ghw && d < ghw) e.gate = 1'b1;
      if (db > -0.125 / h && db < 0.125 / h) e.blr = 1'b1;
    end
    return e;
  endfunction

  function automatic pt_entry_t pattern(int i, int aw, int h);
    return pattern_nb(i, aw, h, h);
  endfunction

  // 437 kHz * 2^32 / 125 MHz
  localparam logic [31:0] FTW_437K = 32'd15015456;
  localparam logic [31:0] FTW_MIN  = 32'd13000000;
  localparam logic [31:0] FTW_MAX  = 32'd17500000;
  localparam logic [15:0] KP       = 16'd2000;
  localparam logic [15:0] KI       = 16'd11000;
endpackage

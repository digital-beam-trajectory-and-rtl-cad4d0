// tb_loop_filter: drives random and step error sequences and compares the
// frequency word clock by clock with an independent model of
//   lp += err - lp/256;  I += lp;  ftw = clamp(f0 + lp*kp/2^12 + I*ki/2^28)
// (products and sums registered as in the design, integration frozen while
// the output is clamped and the error pushes further into the limit).
module tb_loop_filter;
  logic clk = 0, rst_n = 0, clear;
  logic signed [14:0] err;
  logic [31:0] f0, fmin, fmax, ftw;
  logic [15:0] kp, ki;
  logic at_limit;
  int checks = 0, failures = 0, nlim = 0;
  always #4 clk = ~clk;

  loop_filter #(.ERR_W(15), .LPF_SHIFT(8), .PHASE_W(32)) dut (.clk, .rst_n, .clear, .err, .f0,
    .fmin, .fmax, .kp, .ki, .ftw, .at_limit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_lp, m_int, m_prop, m_iterm, m_ftw;
  bit     m_lim;

  function automatic longint asr(longint v, int s);
    return v >>> s;
  endfunction

  // reference model, updated at every rising edge from the pre-edge state
  always @(posedge clk) begin
    longint tot, raw, n_lp, n_int, n_prop, n_iterm, n_ftw;
    bit n_lim;
    if (!rst_n || clear) begin
      n_lp = 0; n_int = 0; n_prop = 0; n_iterm = 0; n_ftw = longint'(f0); n_lim = 0;
    end else begin
      tot   = m_prop + m_iterm;
      n_lp  = m_lp + longint'(err) - asr(m_lp, 8);
      n_int = (m_lim && ((m_lp > 0) == (tot > 0))) ? m_int : m_int + m_lp;
      n_prop  = asr(m_lp * kp, 12);
      n_iterm = asr(m_int * ki, 28);
      raw = longint'(f0) + tot;
      if (raw < longint'(fmin))      begin n_ftw = longint'(fmin); n_lim = 1; end
      else if (raw > longint'(fmax)) begin n_ftw = longint'(fmax); n_lim = 1; end
      else begin n_ftw = raw; n_lim = 0; end
    end
    m_lp = n_lp; m_int = n_int; m_prop = n_prop; m_iterm = n_iterm; m_ftw = n_ftw; m_lim = n_lim;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (longint'(ftw) != m_ftw || at_limit != m_lim) begin
      failures++;
      if (failures < 5) $display("ftw %0d expected %0d (lim %0b/%0b)", ftw, m_ftw, at_limit, m_lim);
    end
    if (at_limit) nlim++;
  end

  initial begin
    longint f_start;
    clear = 0; err = 0; f0 = 32'd15_000_000; fmin = 32'd14_900_000; fmax = 32'd15_100_000;
    kp = 16'd300; ki = 16'd170;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // random error around zero
    repeat (3000) @(negedge clk) err = 15'($signed($urandom_range(0, 4000)) - 2000);
    // positive step: frequency must rise
    @(negedge clk) begin clear = 1; err = 0; end
    @(negedge clk) clear = 0;
    f_start = longint'(ftw);
    repeat (2000) @(negedge clk) err = 15'sd100;
    checks++;
    if (!(longint'(ftw) > f_start)) begin failures++; $display("no rise on positive error"); end
    // large step drives the output into the upper clamp
    repeat (8000) @(negedge clk) err = 15'sd8000;
    checks++;
    if (!(ftw == fmax && at_limit)) begin failures++; $display("upper clamp not reached"); end
    repeat (4000) @(negedge clk) err = -15'sd8000;
    checks++;
    if (nlim == 0) begin failures++; $display("limit never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_baseline_restorer: feeds a bunch train through a model of the
// AC-coupled pick-up (first-order high pass, time constant 2^10 samples) plus
// a constant ADC offset, and checks that the restored output reproduces the
// original bunch signal within a few counts, one clock later. Also checks
// the pass-through mode and that the output clips instead of wrapping.
module tb_baseline_restorer;
  localparam int K = 10;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] x;
  logic blr, corr_en, clipped;
  logic [4:0] droop_shift, blr_shift;
  logic signed [17:0] out;
  int checks = 0, failures = 0, worst = 0, worst_raw = 0;
  always #4 clk = ~clk;

  baseline_restorer #(.IN_W(14), .OUT_W(18), .ACC_W(40)) dut (.clk, .rst_n, .x, .blr, .corr_en,
    .droop_shift, .blr_shift, .out, .clipped);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bunch(int p);   // triangle, height 2000, base 40
    int d;
    d = (p > 20) ? p - 20 : 20 - p;
    return (d < 20) ? 2000 - 100 * d : 0;
  endfunction

  longint pu_acc = 0;
  int s_prev = 0, n = 0;
  bit checking = 0;

  initial begin
    int s, y;
    x = 0; blr = 0; corr_en = 1; droop_shift = 5'(K); blr_shift = 5'd2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (n = 0; n < 30000; n++) begin
      @(negedge clk);
      // compare the previous sample's restoration
      if (checking) begin
        int e;
        e = int'(out) - s_prev;
        checks++;
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        if (e > 12) begin
          failures++;
          if (failures < 5) $display("n=%0d out=%0d expected %0d", n, out, s_prev);
        end
      end
      s = bunch(n % 100);
      y = s - int'(pu_acc >>> K);          // pick-up droop
      pu_acc += longint'(y);
      if (n > 2000 && (s - y) > worst_raw) worst_raw = s - y;
      x = 14'(y + 40);                      // ADC offset
      blr = (n % 100) >= 60 && (n % 100) < 90;
      s_prev = s;
      checking = n > 2000;
    end
    $display("worst restored error %0d counts, raw droop up to %0d counts", worst, worst_raw);
    checks++;
    if (worst_raw < 100) begin failures++; $display("test signal has too little droop"); end
    // pass-through
    @(negedge clk) begin corr_en = 0; x = 14'sd1234; blr = 0; end
    @(negedge clk) x = -14'sd777;
    checks++;
    if (out != 18'sd1234) begin failures++; $display("pass-through failed"); end
    @(negedge clk);
    checks++;
    if (out != -18'sd777) begin failures++; $display("pass-through failed"); end
    // clipping: a large constant input integrates up to the output limit
    corr_en = 1; droop_shift = 5'd0; x = 14'sd8000;
    repeat (40) @(negedge clk);
    checks++;
    if (!(clipped && out == 18'sd131071)) begin failures++; $display("no clipping: %0d", out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

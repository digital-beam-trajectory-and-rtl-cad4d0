// tb_sync_select: the reference must be the RF before injection, stay RF
// while the PU sum is below threshold, switch to the PU sum after det_count
// turns with signal, return to RF at cycle_start, and obey the forced modes.
module tb_sync_select;
  import bto_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] adc_rf, adc_sum, ref_out;
  logic rev_tick, trig_inj, cycle_start, src_pu, switched;
  logic [1:0] mode;
  logic [13:0] det_thresh;
  logic [3:0] det_count;
  int checks = 0, failures = 0, nsw = 0;
  bit beam;
  int cyc = 0;
  always #4 clk = ~clk;

  sync_select dut (.clk, .rst_n, .adc_rf, .adc_sum, .rev_tick, .trig_inj, .cycle_start, .mode,
    .det_thresh, .det_count, .ref_out, .src_pu, .switched);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0d)", msg, cyc); end
  endtask

  // stimulus: revolution of 50 clocks, one bunch of height 3000 when beam is on
  always @(negedge clk) begin
    cyc++;
    rev_tick <= (cyc % 50) == 0;
    adc_rf   <= 14'($signed($urandom_range(0, 2000)) - 1000);
    adc_sum  <= (beam && (cyc % 50) == 20) ? 14'sd3000 : 14'($signed($urandom_range(0, 200)) - 100);
  end

  always @(posedge clk) if (switched) nsw++;

  // registered output: ref_out follows the selected input one clock later
  logic signed [13:0] rf_d, sum_d;
  logic src_d;
  always @(posedge clk) begin
    #1;
    if (rst_n && cyc > 3) check(ref_out == (src_d ? sum_d : rf_d), "ref_out selects input");
  end
  always @(posedge clk) begin rf_d <= adc_rf; sum_d <= adc_sum; src_d <= src_pu; end

  initial begin
    beam = 0; trig_inj = 0; cycle_start = 0; mode = 0; det_thresh = 14'd1500; det_count = 4'd3;
    adc_rf = 0; adc_sum = 0; rev_tick = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(negedge clk);
    check(!src_pu, "RF before injection");
    beam = 1;                         // beam signal but no injection trigger
    repeat (300) @(negedge clk);
    check(!src_pu, "no switch without injection trigger");
    @(negedge clk) trig_inj = 1;
    @(negedge clk) trig_inj = 0;
    repeat (100) @(negedge clk);
    check(!src_pu, "not yet after 2 turns");
    repeat (120) @(negedge clk);
    check(src_pu && nsw == 1, "switched to PU after 3 turns with beam");
    beam = 0;
    repeat (300) @(negedge clk);
    check(src_pu, "stays on PU");
    @(negedge clk) cycle_start = 1;
    @(negedge clk) cycle_start = 0;
    check(!src_pu, "back to RF at cycle start");
    @(negedge clk) mode = 2'd2;
    #1 check(src_pu, "forced PU");
    @(negedge clk) mode = 2'd1;
    #1 check(!src_pu, "forced RF");
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

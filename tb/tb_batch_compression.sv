// tb_batch_compression: the whole design at its default sizes through a
// batch compression. Eight bunches fill all buckets at harmonic 8; the RF
// harmonic then steps to 9 and to 10, so the same eight bunches sit closer
// together and leave empty buckets behind them. Each step is a
// harmonic-change trigger that swaps in a phase table for the new pattern at
// the next turn boundary. The host loads each table into the idle bank once
// the previous swap has happened. The PLL must stay locked through both
// steps, and every per-bunch position must be correct before and after.
// The host starts the DDS at a revolution marker of the beam, so that the
// table's bunch numbering matches the beam's.
// 125 MHz sampling, revolution 437 -> 440 kHz.
module tb_batch_compression;
  import bto_pkg::*;

  localparam real F_CLK = 125.0e6;

  logic clk = 0, rst_n = 0;
  logic signed [13:0] adc_sum, adc_dx, adc_dy, adc_rf;
  logic trig_harm, trig_inj, trig_ms;
  logic [7:0] host_addr;
  logic host_we, host_re, host_rvalid;
  logic [31:0] host_wdata, host_rdata;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rd_valid;
  logic [22:0] mem_cmd_addr;
  logic [127:0] mem_wdata, mem_rdata;
  logic pos_valid, pos_no_beam, rev_start;
  logic signed [23:0] pos_x, pos_y;
  pt_entry_t timing;
  logic [31:0] ftw;

  bto_top dut (.*);

  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  logic beam_on = 0, kick = 0, stall = 0;
  int   h_beam = 8, nwrites;
  real  phi, nturn, x_now;
  int   turns;

  beam_model #(.F_CLK(F_CLK), .F_START(437.0e3), .F_END(440.0e3), .RAMP_TURNS(500.0),
               .AMP(8000.0), .SIGMA(4.0)) u_beam (
    .clk, .beam_on, .h_beam, .n_bunch(8), .kick, .adc_sum, .adc_dx, .adc_dy, .adc_rf, .phi,
    .n_per_turn(nturn), .turns, .x_now);

  sdram_model #(.AW(23), .DW(128), .RD_LAT(12)) u_mem (.clk, .stall, .ready_gap(4),
    .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .wdata(mem_wdata), .rd_valid(mem_rd_valid), .rdata(mem_rdata),
    .nwrites);

  function automatic logic [31:0] ftw_of(real f);
    return 32'($rtoi(f * (2.0 ** 32) / F_CLK + 0.5));
  endfunction

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s (turn %0d)", msg, turns); end
  endtask

  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin host_addr = a; host_wdata = d; host_we = 1; end
    @(negedge clk) host_we = 0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin host_addr = a; host_re = 1; end
    @(negedge clk) host_re = 0;
    d = host_rdata;
  endtask

  task automatic wait_turn(int t);
    while (turns < t) @(negedge clk);
  endtask

  // reference switches, table swaps and per-bunch positions against the
  // true position
  int n_switch = 0, n_swap = 0, n_pos_ok = 0;
  real xq[$];
  bit  pos_check = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.src_switched) n_switch++;
    if (dut.bank_swapped) n_swap++;
    if (dut.ival[0]) xq.push_back(x_now);
    if (pos_valid) begin
      real xt, px, py;
      xt = xq.pop_front();
      px = pos_x / 1000.0;
      py = pos_y / 1000.0;
      if (pos_check) begin
        checks++;
        if (pos_no_beam || px - xt > 0.3 || px - xt < -0.3 || py + 2.0 > 0.3 || py + 2.0 < -0.3) begin
          failures++;
          if (failures < 20) $display("FAIL: position %f,%f mm, beam at %f,-2 (turn %0d)", px, py, xt, turns);
        end else n_pos_ok++;
      end
    end
  end

  // mean DDS phase error over 10 turns, in samples, modulo the bunch spacing
  real esum; int ecount;
  always @(posedge clk) begin
    real e;
    e = dut.phase / (2.0 ** 32) - phi;
    e = tb_beam_pkg::wrapd(e * h_beam) / h_beam * nturn;
    esum += e; ecount++;
  end
  task automatic locked(input string what);
    int t0;
    real m;
    t0 = turns; esum = 0; ecount = 0;
    while (turns < t0 + 10) @(negedge clk);
    m = esum / ecount;
    check(m < 4.0 && m > -4.0, $sformatf("%s: phase error %f samples", what, m));
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_table(int h);
    for (int i = 0; i < 2**10; i++)
      hw(8'h07, {6'd0, 10'(i), 12'd0, 4'(tb_beam_pkg::pattern_nb(i, 10, h, 8))});
  endtask

  // harmonic-change trigger late in a turn; the beam takes the new pattern
  // at its next turn boundary, where the table swap also takes effect
  task automatic compress(int h);
    pos_check = 0;
    while (phi < 0.8) @(negedge clk);
    @(negedge clk) trig_harm = 1;
    @(negedge clk) trig_harm = 0;
    while (phi > 0.5) @(negedge clk);
    h_beam = h;
  endtask

  initial begin
    logic [31:0] st, d;
    real m;
    host_addr = 0; host_we = 0; host_re = 0; host_wdata = 0;
    trig_harm = 0; trig_inj = 0; trig_ms = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // The DDS holds phase 0 until F0 is written. Writing it at a beam
    // revolution marker makes table entry 0 the start of the beam's turn,
    // so each table bunch is the beam's bunch of the same number; with every
    // bucket full, the PLL alone cannot tell the bunches apart.
    while (phi < 0.9) @(negedge clk);
    while (phi > 0.5) @(negedge clk);
    hw(8'h01, tb_beam_pkg::FTW_437K);
    hw(8'h02, tb_beam_pkg::FTW_MIN);
    hw(8'h03, tb_beam_pkg::FTW_MAX);
    hw(8'h04, {tb_beam_pkg::KI, tb_beam_pkg::KP});
    hw(8'h05, {12'd0, 4'd3, 2'd0, 14'd1000});
    hw(8'h06, {19'd0, 5'd2, 3'd0, 5'd12});
    hw(8'h08, {16'd40000, 16'd40000});
    load_table(8);
    hw(8'h00, 32'h0000_0400);
    do hr(8'h18, st); while (!st[2]);
    load_table(9);                          // waits in the idle bank
    hw(8'h00, 32'h0000_0103);
    wait_turn(100);
    locked("RF lock");
    @(negedge clk) begin trig_inj = 1; beam_on = 1; end
    @(negedge clk) trig_inj = 0;
    wait_turn(200);
    hr(8'h18, st);
    check(st[1] == 1'b1 && n_switch == 1, "reference on the pick-up after injection");
    locked("PU lock at h=8");
    pos_check = 1;
    wait_turn(300);
    compress(9);
    do hr(8'h18, st); while (st[2]);
    load_table(10);
    wait_turn(330);
    locked("PU lock at h=9");
    pos_check = 1;
    wait_turn(450);
    compress(10);
    wait_turn(480);
    locked("PU lock at h=10");
    pos_check = 1;
    wait_turn(600);
    locked("PU lock at the end");
    m = ftw * F_CLK / (2.0 ** 32);
    $display("DDS frequency %f Hz, %0d positions checked, %0d table swaps", m, n_pos_ok, n_swap);
    check(n_swap == 3, "table swaps");
    check(m > 439.9e3 && m < 440.1e3, $sformatf("final frequency %f Hz", m));
    check(n_pos_ok > 2500, "positions checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Shared body of the end-to-end testbenches of bto_top. The including module
// declares the DUT signals, instantiates bto_top as dut, and sets
//   AW_MEM, AW_PTR, AW_LA (the top's sizes) and EXPECT_WRAP.
// Scenario (one acquisition cycle, compressed): the host programs the
// design over the register bus and loads two phase tables (2 bunches, and
// 4 bunches after splitting); the PLL locks to the RF; injection brings the
// beam and the reference switches to the PU sum while the revolution
// frequency ramps; a kicker pulse starts betatron oscillations; a
// harmonic-change trigger splits the bunches; 1 ms ticks come every 100
// turns. Every per-bunch position is checked against the true beam
// position, records and pointer entries are read back through the host bus,
// the logic analyser captures one revolution, and the SDRAM is stalled to
// force an overflow. Each mechanism is counted and must occur.

  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  logic beam_on = 0, kick = 0, stall = 0;
  int   h_beam = 2, nwrites;
  real  phi, nturn, x_now;
  int   turns;

  beam_model #(.F_START(437.0e3), .F_END(447.0e3), .RAMP_TURNS(1300.0)) u_beam (
    .clk, .beam_on, .h_beam, .n_bunch(h_beam), .kick, .adc_sum, .adc_dx, .adc_dy, .adc_rf, .phi,
    .n_per_turn(nturn), .turns, .x_now);

  sdram_model #(.AW(AW_MEM), .DW(128), .RD_LAT(12)) u_mem (.clk, .stall, .ready_gap(4),
    .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .wdata(mem_wdata), .rd_valid(mem_rd_valid), .rdata(mem_rdata),
    .nwrites);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s (turn %0d)", msg, turns); end
  endtask

  // ---------------- host bus ----------------
  task automatic hw(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin host_addr = a; host_wdata = d; host_we = 1; end
    @(negedge clk) host_we = 0;
  endtask

  task automatic hr(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin host_addr = a; host_re = 1; end
    @(negedge clk) host_re = 0;
    d = host_rdata;
  endtask

  task automatic load_table(int h);
    for (int i = 0; i < 2**10; i++)
      hw(8'h07, {6'd0, 10'(i), 12'd0, 4'(tb_beam_pkg::pattern(i, 10, h))});
  endtask

  // ---------------- mechanism counters ----------------
  int n_rf_lock = 0, n_pu_lock = 0, n_switch = 0, n_swap = 0, n_blr = 0, n_results = 0;
  int n_pos_ok = 0, n_no_beam = 0, n_stall = 0, n_overflow = 0, n_wrap = 0, n_ptr_ok = 0;
  int n_la = 0, n_rec_ok = 0, n_betatron = 0, n_ms = 0;
  real xmin = 1e9, xmax = -1e9;
  always @(posedge clk) if (rst_n) begin
    if (dut.src_switched) n_switch++;
    if (dut.bank_swapped) n_swap++;
    if (timing.blr) n_blr++;
    if (mem_cmd_valid && !mem_cmd_ready) n_stall++;
  end

  // positions: true position when the bunch was integrated
  real xq[$];
  bit  pos_check = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ival[0]) begin n_results++; xq.push_back(x_now); end
    if (pos_valid) begin
      real xt, px, py;
      xt = xq.pop_front();
      px = pos_x / 1000.0;
      py = pos_y / 1000.0;
      if (pos_no_beam) n_no_beam++;
      else if (pos_check) begin
        checks++;
        if (px - xt > 0.3 || px - xt < -0.3 || py + 2.0 > 0.3 || py + 2.0 < -0.3) begin
          failures++;
          if (failures < 20) $display("FAIL: position %f,%f mm, beam at %f,-2 (turn %0d) sum %0d", px, py, xt, turns, dut.i_sum);
        end else n_pos_ok++;
        if (turns > 420 && turns < 600) begin
          if (px < xmin) xmin = px;
          if (px > xmax) xmax = px;
        end
      end
    end
  end

  // mean DDS phase error over n turns, in samples, modulo the bunch spacing
  real esum; int ecount;
  always @(posedge clk) begin
    real e;
    e = dut.phase / (2.0 ** 32) - phi;
    e = tb_beam_pkg::wrapd(e * h_beam) / h_beam * nturn;
    esum += e; ecount++;
  end
  task automatic locked(input string what, output bit ok);
    int t0;
    real m;
    t0 = turns; esum = 0; ecount = 0;
    while (turns < t0 + 10) @(negedge clk);
    m = esum / ecount;
    ok = (m < 4.0 && m > -4.0);
    check(ok, $sformatf("%s: phase error %f samples", what, m));
  endtask

  // 1 ms ticks, scaled to one per 100 turns
  int last_ms = 0;
  always @(negedge clk) begin
    trig_ms <= 1'b0;
    if (turns / 100 != last_ms) begin last_ms = turns / 100; trig_ms <= 1'b1; n_ms++; end
  end

  task automatic wait_turn(int t);
    while (turns < t) @(negedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, st, nxt, w[4];
    bit ok;
    int nptr;
    int cnt[3];
    host_addr = 0; host_we = 0; host_re = 0; host_wdata = 0;
    trig_harm = 0; trig_inj = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- configuration ----
    hw(8'h01, tb_beam_pkg::FTW_437K);
    hw(8'h02, tb_beam_pkg::FTW_MIN);
    hw(8'h03, tb_beam_pkg::FTW_MAX);
    hw(8'h04, {tb_beam_pkg::KI, tb_beam_pkg::KP});
    hw(8'h05, {12'd0, 4'd3, 2'd0, 14'd1000});
    hw(8'h06, {19'd0, 5'd2, 3'd0, 5'd12});
    hw(8'h08, {16'd40000, 16'd40000});      // S = 40 mm, positions in um
    load_table(2);
    hw(8'h00, 32'h0000_0400);               // swap: 2-bunch table active
    do hr(8'h18, st); while (!st[2]);       // at the next revolution start
    load_table(4);                          // split table waits
    hw(8'h00, 32'h0000_0103);               // loop clear, acquisition on, correction on
    // ---- RF lock before injection ----
    wait_turn(150);
    locked("RF lock", ok);
    if (ok) n_rf_lock++;
    hr(8'h18, st);
    check(st[1] == 1'b0, "RF selected before injection");
    // ---- injection ----
    @(negedge clk) begin trig_inj = 1; beam_on = 1; end
    @(negedge clk) trig_inj = 0;
    wait_turn(180);
    hr(8'h18, st);
    check(st[1] == 1'b1, "PU selected after injection");
    wait_turn(200);
    locked("PU lock", ok);
    if (ok) n_pu_lock++;
    pos_check = 1;
    // ---- logic analyser: restored sum and timing over a revolution start ----
    hw(8'h09, {21'd0, 3'd2, 1'b0, 3'd2, 1'b0, 3'd1});
    hw(8'h0A, 32'd0);
    hw(8'h0B, 32'd3);
    hw(8'h00, 32'h0000_0803);
    do hr(8'h18, st); while (!st[8]);
    n_la++;
    begin
      int peak_in_gate, bad_blr;
      peak_in_gate = 0; bad_blr = 0;
      for (int i = 0; i < 2**AW_LA; i++) begin
        logic signed [23:0] s;
        hw(8'h0C, i);
        hr(8'h0D, d);
        hr(8'h0E, w[0]);
        // sample = {restored sum, timing}: timing in d[23:0], sum split over both words
        s = {w[0][15:0], d[31:24]};
        if (d[1] && int'(s) > peak_in_gate) peak_in_gate = int'(s);        // gate bit
        if (d[0] && (s > 60 || s < -60)) bad_blr++;            // BLR bit
      end
      check(peak_in_gate > 2000, $sformatf("bunch peak inside gate (%0d)", peak_in_gate));
      check(bad_blr == 0, $sformatf("%0d BLR samples off baseline", bad_blr));
    end
    // ---- kicker: betatron oscillation ----
    wait_turn(400);
    @(negedge clk) kick = 1;
    @(negedge clk) kick = 0;
    // ---- bunch splitting at a turn boundary ----
    wait_turn(600);
    while (u_beam.phi < 0.8) @(negedge clk);
    @(negedge clk) trig_harm = 1;
    @(negedge clk) trig_harm = 0;
    pos_check = 0;
    while (u_beam.phi > 0.5) @(negedge clk);
    h_beam = 4;
    wait_turn(620);
    pos_check = 1;
    locked("lock after splitting", ok);
    if (ok) n_pu_lock++;
    check(xmax - xmin > 2.0, $sformatf("betatron oscillation seen (%f..%f mm)", xmin, xmax));
    if (xmax - xmin > 2.0) n_betatron++;
    // ---- read back the newest records through the host ----
    wait_turn(700);
    hr(8'h1A, nxt);
    for (int k = 1; k <= 8; k++) begin
      logic [AW_MEM-1:0] a;
      real px;
      a = AW_MEM'(nxt - k);
      hw(8'h10, 32'(a));
      hw(8'h00, 32'h0000_2003);
      do hr(8'h18, st); while (st[6]);
      for (int j = 0; j < 4; j++) hr(8'h11 + 8'(j), w[j]);
      // w[0] = {bunch, turn}, w[1] = sum, w[2] = dx, w[3] = dy
      px = 40.0 * $signed(w[2]) / $signed(w[1]);
      ok = w[0][31:24] < 4 && $signed(w[1]) > 10000 && px > 0.0 && px < 8.0 &&
           40.0 * $signed(w[3]) / $signed(w[1]) > -2.2 && 40.0 * $signed(w[3]) / $signed(w[1]) < -1.8;
      check(ok, $sformatf("record %0d: %h %h %h %h", a, w[0], w[1], w[2], w[3]));
      if (ok) n_rec_ok++;
      check(u_mem.peek(a) == {w[0], w[1], w[2], w[3]}, "host read matches memory");
    end
    // ---- pointer array ----
    hr(8'h1B, d);
    nptr = d;
    cnt = '{0, 0, 0};
    begin
      logic [AW_MEM-1:0] prev;
      prev = '0;
      for (int i = 0; i < nptr && i < 2**AW_PTR; i++) begin
        hw(8'h15, i);
        hr(8'h16, d);
        cnt[d[31:30]]++;
        if (!EXPECT_WRAP) begin
          check(d[AW_MEM-1:0] >= prev && d[AW_MEM-1:0] <= nxt[AW_MEM-1:0], "pointer addresses in order");
          prev = d[AW_MEM-1:0];
        end
      end
    end
    if (!EXPECT_WRAP) begin
      check(cnt[0] == 1 && cnt[1] == 1 && cnt[2] == n_ms, $sformatf("pointer events %0d %0d %0d", cnt[0], cnt[1], cnt[2]));
      if (cnt[0] == 1 && cnt[1] == 1) n_ptr_ok++;
    end else begin
      hr(8'h18, st);
      check(st[9], "pointer array wrapped");
      if (st[9]) n_ptr_ok++;
    end
    // ---- SDRAM stall: FIFO overflow ----
    stall = 1;
    wait_turn(720);
    stall = 0;
    wait_turn(725);
    hr(8'h18, st);
    check(st[4] == 1'b1, "overflow flagged after stall");
    if (st[4]) n_overflow++;
    if (st[5]) n_wrap++;
    check(st[5] == EXPECT_WRAP, "buffer wrap as expected");
    hr(8'h19, d);
    check(d * 125.0e6 / (2.0 ** 32) > 440.0e3, "DDS frequency follows the ramp");
    // ---- mechanisms ----
    $display("mechanisms: rf_lock=%0d pu_lock=%0d switch=%0d swap=%0d blr_clocks=%0d results=%0d",
             n_rf_lock, n_pu_lock, n_switch, n_swap, n_blr, n_results);
    $display("            pos_ok=%0d no_beam=%0d stall=%0d overflow=%0d wrap=%0d ptr=%0d la=%0d rec=%0d betatron=%0d ms=%0d writes=%0d",
             n_pos_ok, n_no_beam, n_stall, n_overflow, n_wrap, n_ptr_ok, n_la, n_rec_ok, n_betatron, n_ms, nwrites);
    check(n_rf_lock > 0, "RF lock happened");
    check(n_pu_lock > 1, "PU lock happened");
    check(n_switch == 1, "reference switched once");
    check(n_swap == 2, "two phase-table swaps");
    check(n_blr > 0, "baseline restoration active");
    check(n_pos_ok > 1000, "positions computed");
    check(n_no_beam > 0, "no-beam results before injection");
    check(n_stall > 0, "memory back-pressure");
    check(n_overflow > 0, "overflow");
    check(n_ptr_ok > 0, "pointer array");
    check(n_la > 0, "logic analyser capture");
    check(n_rec_ok == 8, "records read back");
    check(n_betatron > 0, "betatron oscillation");
    check(!EXPECT_WRAP || n_wrap > 0, "buffer wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

// tb_sis18: the whole design at its default sizes in a heavy-ion synchrotron
// setting: 62.5 MHz sampling, 4 bunches, revolution 215 -> 225 kHz. The
// beam comes from a linac and is unbunched at injection. The RF then
// bunches it, and only after that does acceleration start. The PLL must stay
// on the RF while the beam is unbunched. It must switch to the pick-up once
// bunches appear and follow the beam through the ramp, with every per-bunch
// position correct.
module tb_sis18;
  import bto_pkg::*;

  localparam real F_CLK = 62.5e6;

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
  always #8 clk = ~clk;

  logic beam_on = 0, kick = 0, stall = 0;
  int   h_beam = 4, nwrites;
  real  phi, nturn, x_now;
  int   turns;

  beam_model #(.F_CLK(F_CLK), .F_START(215.0e3), .F_END(225.0e3), .RAMP_START(700.0),
               .RAMP_TURNS(2000.0), .BUNCH_DELAY(100.0), .BUNCH_TURNS(200.0)) u_beam (
    .clk, .beam_on, .h_beam, .n_bunch(h_beam), .kick, .adc_sum, .adc_dx, .adc_dy, .adc_rf, .phi,
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

  // reference switches and per-bunch positions against the true position
  int n_switch = 0, n_pos_ok = 0;
  real xq[$];
  bit  pos_check = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.src_switched) n_switch++;
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

  initial begin
    logic [31:0] st, d;
    real m;
    host_addr = 0; host_we = 0; host_re = 0; host_wdata = 0;
    trig_harm = 0; trig_inj = 0; trig_ms = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    hw(8'h01, ftw_of(215.0e3));
    hw(8'h02, ftw_of(190.0e3));
    hw(8'h03, ftw_of(260.0e3));
    hw(8'h04, {tb_beam_pkg::KI, tb_beam_pkg::KP});
    hw(8'h05, {12'd0, 4'd3, 2'd0, 14'd1000});
    hw(8'h06, {19'd0, 5'd2, 3'd0, 5'd12});
    hw(8'h08, {16'd40000, 16'd40000});
    for (int i = 0; i < 2**10; i++)
      hw(8'h07, {6'd0, 10'(i), 12'd0, 4'(tb_beam_pkg::pattern(i, 10, 4))});
    hw(8'h00, 32'h0000_0400);
    do hr(8'h18, st); while (!st[2]);
    hw(8'h00, 32'h0000_0103);
    // RF lock, then injection of an unbunched beam
    wait_turn(150);
    locked("RF lock");
    @(negedge clk) begin trig_inj = 1; beam_on = 1; end
    @(negedge clk) trig_inj = 0;
    wait_turn(245);
    hr(8'h18, st);
    check(st[1] == 1'b0 && n_switch == 0, "reference left the RF while the beam was unbunched");
    locked("RF lock with coasting beam");
    // bunching: the loop moves to the pick-up and stays locked
    wait_turn(500);
    hr(8'h18, st);
    check(st[1] == 1'b1 && n_switch == 1, "reference on the pick-up after bunching");
    locked("PU lock after bunching");
    pos_check = 1;
    wait_turn(1700);
    locked("PU lock during ramp");
    wait_turn(2750);
    locked("PU lock after ramp");
    m = ftw * F_CLK / (2.0 ** 32);
    $display("DDS frequency %f Hz, %0d positions checked", m, n_pos_ok);
    check(m > 224.9e3 && m < 225.1e3, $sformatf("final frequency %f Hz", m));
    check(n_pos_ok > 4000, "positions checked");
    hr(8'h1A, d);
    check(d != 0 && nwrites > 4000, "records written to the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

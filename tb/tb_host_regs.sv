// tb_host_regs: writes every configuration register and checks both the
// decoded outputs and the read-back value, the one-clock command pulses of
// CTRL and PT_WRITE, the status/result read paths and the one-clock read
// latency.
module tb_host_regs;
  import bto_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] host_addr;
  logic host_we, host_re, host_rvalid;
  logic [31:0] host_wdata, host_rdata;
  logic acq_en, corr_en, loop_clear, buf_clear, pt_swap, la_arm, cycle_start, buf_rd_req, pt_wr_en;
  logic [1:0] sync_mode;
  logic [31:0] f0, fmin, fmax;
  logic [15:0] kp, ki, sx, sy, la_decim;
  logic [13:0] det_thresh;
  logic [3:0] det_count;
  logic [4:0] droop_shift, blr_shift;
  logic [9:0] pt_wr_addr, la_rd_addr;
  pt_entry_t pt_wr_data;
  logic [2:0] la_sel_a, la_sel_b, la_trig_sel;
  logic [23:0] la_delay, turn;
  logic [22:0] buf_rd_addr, buf_next;
  logic [11:0] ptr_rd_index, ptr_wr_index;
  logic [31:0] status, ftw, ptr_rd_data;
  logic [47:0] la_rd_data;
  logic buf_rd_done;
  logic [127:0] buf_rd_data;
  int checks = 0, failures = 0, pulses = 0;
  always #4 clk = ~clk;

  host_regs dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin host_addr = a; host_wdata = d; host_we = 1; end
    @(negedge clk) host_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin host_addr = a; host_re = 1; end
    @(negedge clk) host_re = 0;
    check(host_rvalid, "rvalid one clock after read");
    d = host_rdata;
  endtask

  always @(posedge clk) if (loop_clear | buf_clear | pt_swap | la_arm | cycle_start | buf_rd_req) pulses++;

  initial begin
    logic [31:0] d;
    host_addr = 0; host_we = 0; host_re = 0; host_wdata = 0;
    status = 32'h1234_5678; ftw = 32'hCAFE_0001; buf_next = 23'h12345; ptr_wr_index = 12'hABC;
    turn = 24'h00BEEF; la_rd_data = 48'h1111_2222_3333; ptr_rd_data = 32'h5555_AAAA;
    buf_rd_done = 0; buf_rd_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(8'h00, 32'h0000_000B);
    check(acq_en && corr_en && sync_mode == 2'd2, "CTRL fields");
    rd(8'h00, d); check(d == 32'hB, "CTRL read");
    wr(8'h01, 32'd15000000); check(f0 == 32'd15000000, "F0");
    wr(8'h02, 32'd14000000); check(fmin == 32'd14000000, "FMIN");
    wr(8'h03, 32'd16000000); rd(8'h03, d); check(fmax == 32'd16000000 && d == fmax, "FMAX");
    wr(8'h04, {16'd2700, 16'd4800}); check(ki == 16'd2700 && kp == 16'd4800, "GAINS");
    wr(8'h05, 32'h0003_0BB8); check(det_count == 4'd3 && det_thresh == 14'd3000, "DET");
    wr(8'h06, 32'h0000_030A); check(blr_shift == 5'd3 && droop_shift == 5'd10, "BLR");
    rd(8'h06, d); check(d == 32'h30A, "BLR read");
    wr(8'h08, {16'd41000, 16'd50000}); check(sy == 16'd41000 && sx == 16'd50000, "SCALE");
    wr(8'h09, 32'h0000_0563); check(la_trig_sel == 3'd5 && la_sel_b == 3'd6 && la_sel_a == 3'd3, "LA_CFG");
    wr(8'h0A, 32'd777); wr(8'h0B, 32'd9); check(la_delay == 24'd777 && la_decim == 16'd9, "LA timing");
    wr(8'h0C, 32'd33); check(la_rd_addr == 10'd33, "LA addr");
    rd(8'h0D, d); check(d == 32'h2222_3333, "LA low");
    rd(8'h0E, d); check(d == 32'h0000_1111, "LA high");
    wr(8'h10, 32'h0076_5432); check(buf_rd_addr == 23'h76_5432, "BUF addr");
    wr(8'h15, 32'd77); check(ptr_rd_index == 12'd77, "PTR index");
    rd(8'h16, d); check(d == 32'h5555_AAAA, "PTR data");
    rd(8'h18, d); check(d == status, "STATUS");
    rd(8'h19, d); check(d == ftw, "FTW");
    rd(8'h1A, d); check(d == 32'h12345, "BUF_NEXT");
    rd(8'h1B, d); check(d == 32'hABC, "PTR_WR_INDEX");
    rd(8'h1C, d); check(d == 32'h00BEEF, "TURN");
    // phase-table write pulse
    @(negedge clk) begin host_addr = 8'h07; host_wdata = {6'd0, 10'd513, 12'd0, 4'b1010}; host_we = 1; end
    @(negedge clk) host_we = 0;
    check(pt_wr_en && pt_wr_addr == 10'd513 && pt_wr_data == 4'b1010, "PT write");
    @(negedge clk) check(!pt_wr_en, "PT write pulse is one clock");
    // command pulses
    pulses = 0;
    wr(8'h00, 32'h0000_3F0B);
    check(loop_clear && buf_clear && pt_swap && la_arm && cycle_start && buf_rd_req, "all pulses");
    @(negedge clk);
    check(pulses == 1, "pulses last one clock");
    check(acq_en, "CTRL held");
    // record read-back
    @(negedge clk) begin buf_rd_done = 1; buf_rd_data = 128'h0102_0304_0506_0708_090A_0B0C_0D0E_0F10; end
    @(negedge clk) buf_rd_done = 0;
    rd(8'h11, d); check(d == 32'h0102_0304, "record word 3");
    rd(8'h14, d); check(d == 32'h0D0E_0F10, "record word 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

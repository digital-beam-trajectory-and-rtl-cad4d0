// tb_bto_top: end-to-end test of the whole acquisition design,
// with the buffer, pointer array and analyser memory shrunk so that the circular buffer and the pointer array wrap during the run.
// The scenario and its checks are in tb_bto_top_body.svh.
module tb_bto_top;
  import bto_pkg::*;
  localparam int AW_MEM = 10;
  localparam int AW_PTR = 3;
  localparam int AW_LA  = 6;
  localparam bit EXPECT_WRAP = 1'b1;

  logic clk = 0, rst_n = 0;
  logic signed [13:0] adc_sum, adc_dx, adc_dy, adc_rf;
  logic trig_harm, trig_inj, trig_ms;
  logic [7:0] host_addr;
  logic host_we, host_re, host_rvalid;
  logic [31:0] host_wdata, host_rdata;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rd_valid;
  logic [AW_MEM-1:0] mem_cmd_addr;
  logic [127:0] mem_wdata, mem_rdata;
  logic pos_valid, pos_no_beam, rev_start;
  logic signed [23:0] pos_x, pos_y;
  pt_entry_t timing;
  logic [31:0] ftw;

  bto_top #(.MEM_AW(AW_MEM), .PTR_AW(AW_PTR), .LA_AW(AW_LA)) dut (.*);

`include "tb_bto_top_body.svh"
endmodule

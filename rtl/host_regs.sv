// host_regs: register bank through which the single board computer sets up
// the acquisition and reads results and diagnostics. Word-addressed bus:
// a write (host_we) stores host_wdata at host_addr; a read (host_re)
// returns the register on host_rdata with host_rvalid one clock later.
//  0x00 CTRL   [0] acq_en [1] corr_en [3:2] sync_mode;
//              write-one pulses: [8] loop_clear [9] buf_clear [10] pt_swap
//              [11] la_arm [12] cycle_start [13] buf_rd_req
//  0x01 F0  0x02 FMIN  0x03 FMAX  (DDS frequency words)
//  0x04 GAINS {ki, kp}   0x05 DET {det_count[19:16], det_thresh[13:0]}
//  0x06 BLR {blr_shift[12:8], droop_shift[4:0]}
//  0x07 PT_WRITE {addr[25:16], entry[3:0]}: writes the idle phase-table bank
//  0x08 SCALE {sy, sx}   0x09 LA_CFG {trig_sel[10:8], sel_b[6:4], sel_a[2:0]}
//  0x0A LA_DELAY  0x0B LA_DECIM  0x0C LA_RDADDR  0x0D/0x0E LA data low/high
//  0x10 BUF_RDADDR  0x11..0x14 record words 3..0 of the last buffer read
//  0x15 PTR_RDINDEX  0x16 PTR_DATA
//  0x18 STATUS  0x19 FTW  0x1A BUF_NEXT  0x1B PTR_WR_INDEX  0x1C TURN
// The host link itself is not specified beyond its role; this map, the
// bus and the reset values are this design's own.
module host_regs
  import bto_pkg::*;
#(
  parameter int PHASE_W = 32,
  parameter int PT_AW   = 10,
  parameter int MEM_AW  = 23,
  parameter int PTR_AW  = 12,
  parameter int LA_AW   = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          host_addr,
  input  logic                host_we,
  input  logic [31:0]         host_wdata,
  input  logic                host_re,
  output logic [31:0]         host_rdata,
  output logic                host_rvalid,
  // configuration
  output logic                acq_en,
  output logic                corr_en,
  output logic [1:0]          sync_mode,
  output logic                loop_clear,
  output logic                buf_clear,
  output logic                pt_swap,
  output logic                la_arm,
  output logic                cycle_start,
  output logic                buf_rd_req,
  output logic [PHASE_W-1:0]  f0,
  output logic [PHASE_W-1:0]  fmin,
  output logic [PHASE_W-1:0]  fmax,
  output logic [15:0]         kp,
  output logic [15:0]         ki,
  output logic [ADC_W-1:0]    det_thresh,
  output logic [3:0]          det_count,
  output logic [4:0]          droop_shift,
  output logic [4:0]          blr_shift,
  output logic                pt_wr_en,
  output logic [PT_AW-1:0]    pt_wr_addr,
  output pt_entry_t           pt_wr_data,
  output logic [15:0]         sx,
  output logic [15:0]         sy,
  output logic [2:0]          la_sel_a,
  output logic [2:0]          la_sel_b,
  output logic [2:0]          la_trig_sel,
  output logic [23:0]         la_delay,
  output logic [15:0]         la_decim,
  output logic [LA_AW-1:0]    la_rd_addr,
  output logic [MEM_AW-1:0]   buf_rd_addr,
  output logic [PTR_AW-1:0]   ptr_rd_index,
  // status and read data
  input  logic [31:0]         status,
  input  logic [PHASE_W-1:0]  ftw,
  input  logic [MEM_AW-1:0]   buf_next,
  input  logic [PTR_AW-1:0]   ptr_wr_index,
  input  logic [23:0]         turn,
  input  logic [47:0]         la_rd_data,
  input  logic                buf_rd_done,
  input  logic [REC_W-1:0]    buf_rd_data,
  input  logic [31:0]         ptr_rd_data
);
  logic [REC_W-1:0] rec;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acq_en <= 1'b0; corr_en <= 1'b0; sync_mode <= 2'd0;
      f0 <= '0; fmin <= '0; fmax <= '1; kp <= '0; ki <= '0;
      det_thresh <= '1; det_count <= 4'd4;
      droop_shift <= 5'd12; blr_shift <= 5'd2;
      sx <= '0; sy <= '0;
      la_sel_a <= '0; la_sel_b <= '0; la_trig_sel <= '0;
      la_delay <= '0; la_decim <= '0; la_rd_addr <= '0;
      buf_rd_addr <= '0; ptr_rd_index <= '0;
      pt_wr_addr <= '0; pt_wr_data <= '0;
      rec <= '0;
    end else begin
      if (buf_rd_done) rec <= buf_rd_data;
      if (host_we) begin
        unique case (host_addr)
          8'h00: begin
            acq_en    <= host_wdata[0];
            corr_en   <= host_wdata[1];
            sync_mode <= host_wdata[3:2];
          end
          8'h01: f0   <= host_wdata[PHASE_W-1:0];
          8'h02: fmin <= host_wdata[PHASE_W-1:0];
          8'h03: fmax <= host_wdata[PHASE_W-1:0];
          8'h04: {ki, kp} <= host_wdata;
          8'h05: {det_count, det_thresh} <= {host_wdata[19:16], host_wdata[ADC_W-1:0]};
          8'h06: {blr_shift, droop_shift} <= {host_wdata[12:8], host_wdata[4:0]};
          8'h07: begin
            pt_wr_addr <= host_wdata[16 +: PT_AW];
            pt_wr_data <= host_wdata[3:0];
          end
          8'h08: {sy, sx} <= host_wdata;
          8'h09: {la_trig_sel, la_sel_b, la_sel_a} <= {host_wdata[10:8], host_wdata[6:4], host_wdata[2:0]};
          8'h0A: la_delay   <= host_wdata[23:0];
          8'h0B: la_decim   <= host_wdata[15:0];
          8'h0C: la_rd_addr <= host_wdata[LA_AW-1:0];
          8'h10: buf_rd_addr  <= host_wdata[MEM_AW-1:0];
          8'h15: ptr_rd_index <= host_wdata[PTR_AW-1:0];
          default: ;
        endcase
      end
    end
  end

  // write-one command pulses, one clock long
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {loop_clear, buf_clear, pt_swap, la_arm, cycle_start, buf_rd_req, pt_wr_en} <= '0;
    end else begin
      {buf_rd_req, cycle_start, la_arm, pt_swap, buf_clear, loop_clear} <=
        (host_we && host_addr == 8'h00) ? host_wdata[13:8] : 6'd0;
      pt_wr_en <= host_we && host_addr == 8'h07;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      host_rdata  <= '0;
      host_rvalid <= 1'b0;
    end else begin
      host_rvalid <= host_re;
      if (host_re) begin
        unique case (host_addr)
          8'h00: host_rdata <= {28'd0, sync_mode, corr_en, acq_en};
          8'h01: host_rdata <= 32'(f0);
          8'h02: host_rdata <= 32'(fmin);
          8'h03: host_rdata <= 32'(fmax);
          8'h04: host_rdata <= {ki, kp};
          8'h05: host_rdata <= {12'd0, det_count, 2'd0, det_thresh};
          8'h06: host_rdata <= {19'd0, blr_shift, 3'd0, droop_shift};
          8'h08: host_rdata <= {sy, sx};
          8'h09: host_rdata <= {21'd0, la_trig_sel, 1'b0, la_sel_b, 1'b0, la_sel_a};
          8'h0A: host_rdata <= {8'd0, la_delay};
          8'h0B: host_rdata <= {16'd0, la_decim};
          8'h0D: host_rdata <= la_rd_data[31:0];
          8'h0E: host_rdata <= {16'd0, la_rd_data[47:32]};
          8'h11: host_rdata <= rec[127:96];
          8'h12: host_rdata <= rec[95:64];
          8'h13: host_rdata <= rec[63:32];
          8'h14: host_rdata <= rec[31:0];
          8'h16: host_rdata <= ptr_rd_data;
          8'h18: host_rdata <= status;
          8'h19: host_rdata <= 32'(ftw);
          8'h1A: host_rdata <= 32'(buf_next);
          8'h1B: host_rdata <= 32'(ptr_wr_index);
          8'h1C: host_rdata <= {8'd0, turn};
          default: host_rdata <= 32'hDEAD_BEEF;
        endcase
      end
    end
  end
endmodule

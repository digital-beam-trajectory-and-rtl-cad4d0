// circular_buffer: writes the per-bunch integration results into the large
// external SDRAM as a circular buffer and serves host reads from it.
// Each time the integrators deliver a bunch, a 128-bit record
// {bunch index, turn number, sum, dx, dy} (bto_pkg::pack_record) is queued
// in a small FIFO that absorbs SDRAM latency; records are then written to
// consecutive record addresses, wrapping from 2^MEM_AW-1 to 0, so the buffer
// always holds the most recent 2^MEM_AW bunches. The bunch index restarts at
// each revolution start and the turn number counts revolutions.
// next_addr is the address the next accepted record will get; the pointer
// array stores it at each timing event. A host read (rd_req with rd_addr)
// is queued on the same port and answered with rd_done and rd_data.
// Writes and the pending host read alternate when both are ready.
// Memory port: mem_cmd_valid/mem_cmd_ready handshake (command held stable
// until accepted), mem_cmd_we selects write, read data returns later on
// mem_rd_valid/mem_rdata. A record arriving with the FIFO full is lost and
// sets the sticky overflow flag; wrapped is set once the buffer has wrapped.
// The circular SDRAM buffer follows the original system; the record format, FIFO
// and port protocol are this design's choices.
module circular_buffer
  import bto_pkg::*;
#(
  parameter int MEM_AW  = 23,
  parameter int FIFO_AW = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,       // restart at address 0
  input  logic                    acq_en,
  input  logic                    rev_start,
  input  logic                    res_valid,
  input  logic signed [BUS_W-1:0] res_sum,
  input  logic signed [BUS_W-1:0] res_dx,
  input  logic signed [BUS_W-1:0] res_dy,
  output logic [MEM_AW-1:0]       next_addr,
  output logic                    wrapped,
  output logic                    overflow,
  output logic [23:0]             turn,
  // host read
  input  logic                    rd_req,
  input  logic [MEM_AW-1:0]       rd_addr,
  output logic                    rd_busy,
  output logic                    rd_done,
  output logic [REC_W-1:0]        rd_data,
  // SDRAM controller port
  output logic                    mem_cmd_valid,
  input  logic                    mem_cmd_ready,
  output logic                    mem_cmd_we,
  output logic [MEM_AW-1:0]       mem_cmd_addr,
  output logic [REC_W-1:0]        mem_wdata,
  input  logic                    mem_rd_valid,
  input  logic [REC_W-1:0]        mem_rdata
);
  localparam int FW = MEM_AW + REC_W;

  logic [7:0]  bunch;
  result_t     rec;
  logic        push, pop, full, empty;
  logic [FW-1:0] fdin, fdout;

  // ---- tagging and enqueue ----
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      bunch     <= '0;
      turn      <= '0;
      next_addr <= '0;
      wrapped   <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      if (rev_start) begin
        turn  <= turn + 24'd1;
        bunch <= '0;
      end
      if (push) begin
        if (full) overflow <= 1'b1;
        else begin
          next_addr <= next_addr + 1'b1;
          if (&next_addr) wrapped <= 1'b1;
        end
        if (!rev_start) bunch <= bunch + 8'd1;
      end
    end
  end

  assign rec  = '{bunch: bunch, turn: turn, sum: res_sum, dx: res_dx, dy: res_dy};
  assign push = res_valid && acq_en;
  assign fdin = {next_addr, pack_record(rec)};

  sync_fifo #(.W(FW), .AW(FIFO_AW)) u_fifo (
    .clk, .rst_n(rst_n && !clear), .push, .din(fdin), .pop, .dout(fdout),
    .full, .empty, .count()
  );

  // ---- SDRAM command issue ----
  logic             rd_pend, rd_wait, last_rd;
  logic [MEM_AW-1:0] rd_a;
  logic             sel_rd;

  assign sel_rd = rd_pend && !rd_wait && (empty || !last_rd);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_cmd_valid <= 1'b0;
      mem_cmd_we    <= 1'b0;
      mem_cmd_addr  <= '0;
      mem_wdata     <= '0;
      rd_pend       <= 1'b0;
      rd_wait       <= 1'b0;
      last_rd       <= 1'b0;
      rd_a          <= '0;
      rd_done       <= 1'b0;
      rd_data       <= '0;
    end else begin
      rd_done <= 1'b0;
      if (rd_req && !rd_pend) begin
        rd_pend <= 1'b1;
        rd_a    <= rd_addr;
      end
      if (mem_cmd_valid && mem_cmd_ready) mem_cmd_valid <= 1'b0;
      if (!mem_cmd_valid || mem_cmd_ready) begin
        if (sel_rd) begin
          mem_cmd_valid <= 1'b1;
          mem_cmd_we    <= 1'b0;
          mem_cmd_addr  <= rd_a;
          rd_wait       <= 1'b1;
          last_rd       <= 1'b1;
        end else if (!empty) begin
          mem_cmd_valid <= 1'b1;
          mem_cmd_we    <= 1'b1;
          mem_cmd_addr  <= fdout[FW-1 -: MEM_AW];
          mem_wdata     <= fdout[REC_W-1:0];
          last_rd       <= 1'b0;
        end
      end
      if (mem_rd_valid && rd_wait) begin
        rd_data <= mem_rdata;
        rd_done <= 1'b1;
        rd_wait <= 1'b0;
        rd_pend <= 1'b0;
      end
    end
  end

  assign pop     = (!mem_cmd_valid || mem_cmd_ready) && !sel_rd && !empty;
  assign rd_busy = rd_pend;

  // A command stays on the port, unchanged, until the controller takes it.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_cmd_valid && !mem_cmd_ready |=> mem_cmd_valid && $stable(mem_cmd_addr)
                                        && $stable(mem_cmd_we) && $stable(mem_wdata));
endmodule

// pointer_array: index into the SDRAM circular buffer.
// Each external timing event (harmonic change, injection, 1 ms machine
// tick) stores one 32-bit entry {event type (2 bits, bto_pkg::event_e),
// zero padding, record address (MEM_AW bits)} in an on-chip RAM of
// 2^PTR_AW entries, written in order and wrapping. The address is that of
// the next record the buffer will accept, so software can jump straight
// to the data that followed the event. Events arriving together are held
// as pending and logged one per clock, harmonic change first. wr_index is
// the next entry to be written, wrapped is set after the first wrap, and
// the host reads entry rd_index on rd_data one clock later.
// The event list and the separate embedded RAM follow the original system; the
// entry format and ordering are this design's choices.
module pointer_array
  import bto_pkg::*;
#(
  parameter int MEM_AW = 23,
  parameter int PTR_AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              ev_harm,
  input  logic              ev_inj,
  input  logic              ev_ms,
  input  logic [MEM_AW-1:0] buf_addr,
  output logic [PTR_AW-1:0] wr_index,
  output logic              wrapped,
  input  logic [PTR_AW-1:0] rd_index,
  output logic [31:0]       rd_data
);
  logic [31:0] ram [2**PTR_AW];
  logic [2:0]  pend, req;
  logic        we;
  event_e      ev;
  logic [31:0] wdata;

  assign req = pend | {ev_ms, ev_inj, ev_harm};

  always_comb begin
    we = 1'b1;
    if (req[0])      ev = EV_HARM;
    else if (req[1]) ev = EV_INJ;
    else if (req[2]) ev = EV_MS;
    else begin
      ev = EV_HARM;
      we = 1'b0;
    end
  end

  assign wdata = {ev, (30-MEM_AW)'(0), buf_addr};

  always_ff @(posedge clk) begin
    if (we) ram[wr_index] <= wdata;
    rd_data <= ram[rd_index];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      pend     <= '0;
      wr_index <= '0;
      wrapped  <= 1'b0;
    end else begin
      pend <= req & ~(we ? (3'b001 << ev) : 3'b000);
      if (we) begin
        wr_index <= wr_index + 1'b1;
        if (&wr_index) wrapped <= 1'b1;
      end
    end
  end
endmodule

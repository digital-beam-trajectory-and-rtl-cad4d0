// sdram_model: behavioural stand-in for the external DDR2 SDRAM and its
// controller, for simulation only. Accepts a command when cmd_valid and
// cmd_ready are both high; cmd_ready is withheld at random (about one clock
// in ready_gap) and always while stall is high. Writes store the record in a
// sparse array; a read returns the stored record (zero if never written)
// on rd_valid after RD_LAT clocks. nwrites counts accepted writes.
module sdram_model #(
  parameter int AW     = 23,
  parameter int DW     = 128,
  parameter int RD_LAT = 12
) (
  input  logic          clk,
  input  logic          stall,
  input  int            ready_gap,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic          cmd_we,
  input  logic [AW-1:0] cmd_addr,
  input  logic [DW-1:0] wdata,
  output logic          rd_valid,
  output logic [DW-1:0] rdata,
  output int            nwrites
);
  logic [DW-1:0] mem [logic [AW-1:0]];
  logic [DW-1:0] pipe_d [RD_LAT];
  logic          pipe_v [RD_LAT];

  initial begin
    nwrites = 0;
    cmd_ready = 1'b0;
    for (int i = 0; i < RD_LAT; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
  end

  function automatic logic [DW-1:0] peek(input logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) begin
      if (cmd_we) begin
        mem[cmd_addr] = wdata;
        nwrites++;
      end
    end
    for (int i = RD_LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= cmd_valid && cmd_ready && !cmd_we;
    pipe_d[0] <= peek(cmd_addr);
    cmd_ready <= !stall && (ready_gap <= 0 || $urandom_range(0, ready_gap - 1) != 0);
  end

  assign rd_valid = pipe_v[RD_LAT-1];
  assign rdata    = pipe_d[RD_LAT-1];
endmodule

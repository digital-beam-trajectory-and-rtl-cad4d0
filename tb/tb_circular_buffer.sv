// tb_circular_buffer: sends bunch results (with revolution starts) through
// the buffer writer into a behavioural SDRAM that stalls at random, and
// checks every stored record (address, bunch index, turn, sum, dx, dy), the
// wrap of the write address, the overflow flag when the memory stalls for
// too long, and host reads through the same port.
module tb_circular_buffer;
  import bto_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  logic clear, acq_en, rev_start, res_valid;
  logic signed [23:0] res_sum, res_dx, res_dy;
  logic [AW-1:0] next_addr, rd_addr, mem_cmd_addr;
  logic wrapped, overflow, rd_req, rd_busy, rd_done;
  logic [23:0] turn;
  logic [127:0] rd_data, mem_wdata, mem_rdata;
  logic mem_cmd_valid, mem_cmd_ready, mem_cmd_we, mem_rd_valid;
  logic stall;
  int ready_gap, nwrites;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  circular_buffer #(.MEM_AW(AW), .FIFO_AW(3)) dut (.*);

  sdram_model #(.AW(AW), .DW(128), .RD_LAT(9)) u_mem (.clk, .stall, .ready_gap,
    .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd_we(mem_cmd_we),
    .cmd_addr(mem_cmd_addr), .wdata(mem_wdata), .rd_valid(mem_rd_valid), .rdata(mem_rdata),
    .nwrites);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  logic [127:0] shadow [2**AW];

  function automatic logic [127:0] rec(int b, int t, int s, int x, int y);
    return {8'(b), 24'(t), 32'(s), 32'(x), 32'(y)};
  endfunction

  initial begin
    int t, b, n;
    clear = 0; acq_en = 1; rev_start = 0; res_valid = 0; res_sum = 0; res_dx = 0; res_dy = 0;
    rd_req = 0; rd_addr = 0; stall = 0; ready_gap = 3;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    t = 0; n = 0;
    // 30 turns of 4 bunches, one result every 5 clocks: buffer of 64 wraps
    for (int turnno = 0; turnno < 30; turnno++) begin
      @(negedge clk) rev_start = 1;
      @(negedge clk) rev_start = 0;
      t++;
      for (b = 0; b < 4; b++) begin
        repeat (4) @(negedge clk);
        res_valid = 1;
        res_sum = 24'($urandom_range(0, 8000000));
        res_dx  = 24'($signed($urandom_range(0, 200000)) - 100000);
        res_dy  = 24'($signed($urandom_range(0, 200000)) - 100000);
        shadow[n % 64] = rec(b, t, int'(res_sum), int'(res_dx), int'(res_dy));
        n++;
        @(negedge clk) res_valid = 0;
      end
    end
    repeat (50) @(negedge clk);
    check(nwrites == n, $sformatf("all %0d records written (%0d)", n, nwrites));
    check(wrapped && !overflow && next_addr == AW'(n), "wrapped, no overflow");
    for (int a = 0; a < 2**AW; a++)
      check(u_mem.peek(AW'(a)) == shadow[a], $sformatf("record at %0d", a));
    // host reads through the controller
    for (int a = 0; a < 6; a++) begin
      int ra;
      ra = $urandom_range(0, 63);
      @(negedge clk) begin rd_req = 1; rd_addr = AW'(ra); end
      @(negedge clk) rd_req = 0;
      check(rd_busy, "read pending");
      while (!rd_done) @(negedge clk);
      check(rd_data == shadow[ra], $sformatf("host read of %0d", ra));
    end
    // overflow: stalled memory, FIFO of 8 fills
    stall = 1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk) res_valid = 1;
      @(negedge clk) res_valid = 0;
    end
    check(overflow, "overflow flagged while memory stalls");
    stall = 0;
    repeat (40) @(negedge clk);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    check(!overflow && !wrapped && next_addr == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

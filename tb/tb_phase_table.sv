// tb_phase_table: loads both banks through the idle-bank write port, checks
// that reads come from the active bank only, that a swap request waits for
// the next revolution tick, and that writes never disturb the active bank.
module tb_phase_table;
  import bto_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] rd_addr, wr_addr;
  logic rev_tick, wr_en, swap_req, active_bank, swap_pending, swapped;
  pt_entry_t entry, wr_data;
  int checks = 0, failures = 0;
  logic [3:0] pat_a [2**AW], pat_b [2**AW];
  always #4 clk = ~clk;

  phase_table #(.PT_AW(AW)) dut (.clk, .rst_n, .rd_addr, .rev_tick, .entry, .wr_en, .wr_addr,
    .wr_data, .swap_req, .active_bank, .swap_pending, .swapped);

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

  task automatic load(input logic [3:0] pat [2**AW]);
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(i); wr_data = pat[i];
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic verify(input logic [3:0] pat [2**AW], input string name);
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); rd_addr = AW'(i);
      @(posedge clk); #1;
      check(entry == pat[i], name);
    end
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) begin pat_a[i] = 4'($urandom); pat_b[i] = 4'($urandom); end
    rd_addr = 0; wr_addr = 0; wr_en = 0; wr_data = '0; rev_tick = 0; swap_req = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(active_bank == 0, "bank 0 active after reset");
    load(pat_a);                       // into bank 1 (idle)
    @(negedge clk) swap_req = 1;
    @(negedge clk) swap_req = 0;
    check(active_bank == 0 && swap_pending, "swap waits for revolution start");
    repeat (5) @(negedge clk);
    check(active_bank == 0, "no swap without rev_tick");
    rev_tick = 1;
    @(posedge clk); #1;
    check(swapped && active_bank == 1 && !swap_pending, "swap at revolution start");
    @(negedge clk) rev_tick = 0;
    verify(pat_a, "bank 1 pattern");
    load(pat_b);                       // into bank 0, now idle
    verify(pat_a, "active bank untouched by idle-bank writes");
    // swap requested in the same clock as the revolution tick
    @(negedge clk) begin swap_req = 1; rev_tick = 1; end
    @(posedge clk); #1;
    check(active_bank == 0 && swapped, "immediate swap at tick");
    @(negedge clk) begin swap_req = 0; rev_tick = 0; end
    verify(pat_b, "bank 0 pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

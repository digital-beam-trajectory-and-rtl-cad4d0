// tb_pointer_array: fires harmonic-change, injection and 1 ms events, alone
// and together, with a moving buffer address, and reads the array back:
// each entry must hold the right event type and the address at the event,
// in order, simultaneous events one per clock with harmonic change first.
// Also checks the wrap of the entry index.
module tb_pointer_array;
  import bto_pkg::*;
  localparam int AW = 5;
  logic clk = 0, rst_n = 0, clear;
  logic ev_harm, ev_inj, ev_ms, wrapped;
  logic [22:0] buf_addr;
  logic [AW-1:0] wr_index, rd_index;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  pointer_array #(.MEM_AW(23), .PTR_AW(AW)) dut (.clk, .rst_n, .clear, .ev_harm, .ev_inj, .ev_ms,
    .buf_addr, .wr_index, .wrapped, .rd_index, .rd_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expq[$];

  initial begin
    ev_harm = 0; ev_inj = 0; ev_ms = 0; buf_addr = 0; rd_index = 0; clear = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // single events, address moving by one per clock
    for (int n = 0; n < 25; n++) begin
      @(negedge clk);
      buf_addr = buf_addr + 23'd1;
      ev_harm = (n % 3 == 0); ev_inj = 0; ev_ms = 0;
      if (n % 3 == 1) ev_inj = 1;
      if (n % 3 == 2) ev_ms = 1;
      expq.push_back({(n % 3 == 0) ? EV_HARM : (n % 3 == 1) ? EV_INJ : EV_MS, 7'd0, buf_addr});
      @(negedge clk); ev_harm = 0; ev_inj = 0; ev_ms = 0;
    end
    // three events in one clock: logged over three clocks, harmonic first
    @(negedge clk) begin ev_harm = 1; ev_inj = 1; ev_ms = 1; buf_addr = 23'h7FFFF0; end
    @(negedge clk) begin ev_harm = 0; ev_inj = 0; ev_ms = 0; end
    expq.push_back({EV_HARM, 7'd0, 23'h7FFFF0});
    expq.push_back({EV_INJ,  7'd0, 23'h7FFFF0});
    expq.push_back({EV_MS,   7'd0, 23'h7FFFF0});
    repeat (4) @(negedge clk);
    checks++;
    if (wr_index != AW'(28) || wrapped) begin failures++; $display("wr_index %0d", wr_index); end
    for (int i = 0; i < 28; i++) begin
      rd_index = AW'(i);
      @(negedge clk);
      checks++;
      if (rd_data != expq[i]) begin
        failures++;
        $display("entry %0d = %h expected %h", i, rd_data, expq[i]);
      end
    end
    // wrap: 4 more events
    repeat (4) begin @(negedge clk) ev_ms = 1; @(negedge clk) ev_ms = 0; end
    checks++;
    if (!wrapped || wr_index != AW'(0)) begin failures++; $display("no wrap"); end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++;
    if (wrapped || wr_index != 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

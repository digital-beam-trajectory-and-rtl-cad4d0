// tb_logic_analyser: probes carry a free-running count (offset per probe),
// so every stored sample tells exactly when and from which probe it was
// taken. Runs captures with different probe choices, trigger bits, delays
// and decimations and checks each stored sample, the ignored pre-arm
// triggers and the done flag.
module tb_logic_analyser;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  logic [7:0][23:0] probes;
  logic [7:0] trigs;
  logic [2:0] sel_a, sel_b, trig_sel;
  logic [23:0] delay;
  logic [15:0] decim;
  logic arm, armed, done, triggered;
  logic [AW-1:0] rd_addr;
  logic [47:0] rd_data;
  int checks = 0, failures = 0;
  logic [23:0] cnt = 0;
  always #4 clk = ~clk;

  logic_analyser #(.NPROBE(8), .PROBE_W(24), .NTRIG(8), .LA_AW(AW)) dut (.clk, .rst_n, .probes,
    .trigs, .sel_a, .sel_b, .trig_sel, .delay, .decim, .arm, .armed, .done, .triggered, .rd_addr,
    .rd_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) cnt <= cnt + 24'd1;
  always_comb for (int i = 0; i < 8; i++) probes[i] = cnt + 24'(i * 100000);

  task automatic capture(input int a, input int b, input int t, input int d, input int m);
    logic [23:0] c0;
    sel_a = 3'(a); sel_b = 3'(b); trig_sel = 3'(t); delay = 24'(d); decim = 16'(m);
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
    repeat ($urandom_range(3, 30)) @(negedge clk);
    trigs[t] = 1;                      // seen at the next rising edge
    c0 = cnt + 24'd1;                 // probe time at that edge
    @(negedge clk) trigs[t] = 0;
    repeat (20) @(negedge clk) trigs[t] = ($urandom_range(0, 3) == 0);   // extra triggers ignored
    trigs = '0;
    while (!done) @(negedge clk);
    for (int k = 0; k < 2**AW; k++) begin
      logic [23:0] exp_t;
      rd_addr = AW'(k);
      @(negedge clk);
      exp_t = c0 + 24'(d) + 24'd1 + 24'(k * (m + 1));
      checks++;
      if (rd_data != {exp_t + 24'(a * 100000), exp_t + 24'(b * 100000)}) begin
        failures++;
        if (failures < 5) $display("sample %0d = %h expected time %h", k, rd_data, exp_t);
      end
    end
  endtask

  initial begin
    trigs = '0; sel_a = 0; sel_b = 0; trig_sel = 0; delay = 0; decim = 0; arm = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // trigger before arming must be ignored
    trigs[2] = 1;
    @(negedge clk) trigs = '0;
    checks++;
    if (armed || done) begin failures++; $display("captured without arm"); end
    capture(1, 3, 2, 0, 0);
    capture(0, 7, 5, 17, 0);
    capture(6, 2, 0, 100, 3);
    capture(4, 4, 7, 1, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

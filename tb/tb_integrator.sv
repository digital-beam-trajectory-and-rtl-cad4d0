// tb_integrator: random gate patterns and samples; each result must equal the
// sum of the samples inside its gate and appear one clock after the gate
// falls. Also drives one long gate of full-scale samples to check saturation.
module tb_integrator;
  logic clk = 0, rst_n = 0;
  logic signed [17:0] x;
  logic gate;
  logic signed [23:0] result;
  logic valid, sat;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  integrator #(.IN_W(18), .OUT_W(24)) dut (.clk, .rst_n, .x, .gate, .result, .valid, .sat);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint expq[$];
  longint acc;
  logic   gate_d;
  // reference model: samples and gate seen at each rising edge
  always @(posedge clk) if (rst_n) begin
    if (gate) acc += longint'(x);
    else if (gate_d) begin expq.push_back(acc); acc = 0; end
    gate_d = gate;
  end

  always @(negedge clk) if (rst_n && valid) begin
    longint e;
    checks++;
    e = expq.pop_front();
    if (e > 64'sd8388607) e = 8388607;
    if (e < -64'sd8388607) e = -8388607;
    if (longint'(result) != e) begin
      failures++;
      if (failures < 5) $display("result %0d expected %0d", result, e);
    end
    if (sat != (e == 8388607 || e == -8388607)) begin failures++; $display("sat flag wrong"); end
  end

  initial begin
    acc = 0; gate_d = 0;
    x = 0; gate = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      x = 18'($signed($urandom_range(0, 60000)) - 30000);
      if ($urandom_range(0, 9) == 0) gate = ~gate;
    end
    // saturation: 400 samples of +131071 exceeds 2^23
    @(negedge clk) gate = 0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      @(negedge clk); gate = 1; x = 18'sd131071;
    end
    @(negedge clk) gate = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

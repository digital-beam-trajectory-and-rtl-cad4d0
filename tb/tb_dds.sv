// tb_dds: checks the DDS phase accumulator against a reference sum and
// counts revolution ticks (one per phase wrap) for random tuning words.
module tb_dds;
  logic clk = 0, rst_n = 0;
  logic [31:0] ftw, phase;
  logic rev_tick;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  dds #(.PHASE_W(32)) dut (.clk, .rst_n, .ftw, .phase, .rev_tick);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ref_acc;
    int ticks, exp_ticks;
    ftw = 32'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      ftw = (t == 0) ? 32'h1000_0000 : $urandom_range(32'h0800_0000, 32'h0000_1000) * 7;
      @(negedge clk);
      ref_acc = 64'(phase);
      ticks = 0;
      exp_ticks = 0;
      for (int n = 0; n < 5000; n++) begin
        @(posedge clk); #1;
        ref_acc += 64'(ftw);
        if (ref_acc >= 64'h1_0000_0000) begin ref_acc -= 64'h1_0000_0000; exp_ticks++; end
        if (rev_tick) ticks++;
        checks++;
        if (phase != ref_acc[31:0]) begin
          failures++;
          if (failures < 5) $display("phase mismatch %h vs %h", phase, ref_acc[31:0]);
        end
      end
      checks++;
      if (ticks != exp_ticks) begin failures++; $display("ticks %0d vs %0d", ticks, exp_ticks); end
    end
    // ftw = 2^28 must tick exactly every 16 clocks
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

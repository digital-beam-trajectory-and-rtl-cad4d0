// tb_pll_mixer: checks the three-level LO multiplication (+x, -x, 0) and its
// one-clock latency with random samples, including the most negative input.
module tb_pll_mixer;
  logic clk = 0, rst_n = 0;
  logic signed [13:0] ref_in;
  logic lo_en, lo_neg;
  logic signed [14:0] prod;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  pll_mixer #(.IN_W(14)) dut (.clk, .rst_n, .ref_in, .lo_en, .lo_neg, .prod);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    ref_in = 0; lo_en = 0; lo_neg = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ref_in = (n == 5) ? -14'sd8192 : 14'($urandom);
      lo_en  = $urandom_range(0, 2) != 0;
      lo_neg = 1'($urandom_range(0, 1));
      expv   = !lo_en ? 0 : (lo_neg ? -int'(ref_in) : int'(ref_in));
      @(posedge clk); #1;
      checks++;
      if (int'(prod) != expv) begin
        failures++;
        if (failures < 5) $display("prod %0d expected %0d", prod, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

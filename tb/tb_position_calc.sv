// tb_position_calc: streams a random bunch result every clock (and some
// gaps) and checks x = trunc(Sx*dx/sum), y = trunc(Sy*dy/sum), the no-beam
// rule for sum <= 0, saturation, and the fixed latency of POS_W+1 clocks.
module tb_position_calc;
  localparam int LAT = 24 + 1;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, no_beam;
  logic signed [23:0] sum, dx, dy, pos_x, pos_y;
  logic [15:0] sx, sy;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  position_calc #(.S_W(16), .POS_W(24)) dut (.clk, .rst_n, .in_valid, .sum, .dx, .dy, .sx, .sy,
    .out_valid, .pos_x, .pos_y, .no_beam);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint x, y; bit nb; int unsigned t; } exp_t;
  exp_t q[$];

  function automatic longint pos(longint d, longint s, longint k);
    longint m = (d < 0 ? -d : d) * k / s;
    if (m > 8388607) m = 8388607;
    return d < 0 ? -m : m;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    e = q.pop_front();
    if (e.nb != no_beam || (!e.nb && (longint'(pos_x) != e.x || longint'(pos_y) != e.y)) || (e.nb && (pos_x != 0 || pos_y != 0))
        || cyc - e.t != LAT) begin
      failures++;
      if (failures < 6) $display("got %0d %0d nb%0b lat %0d, expected %0d %0d nb%0b", pos_x, pos_y,
                                 no_beam, cyc - e.t, e.x, e.y, e.nb);
    end
  end

  initial begin
    in_valid = 0; sum = 0; dx = 0; dy = 0; sx = 16'd50000; sy = 16'd41000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      sum = 24'($urandom_range(1, 4000000));
      if (n % 97 == 0) sum = -24'sd5;
      if (n % 89 == 0) sum = 24'sd0;
      dx = 24'($signed($urandom_range(0, 2000000)) - 1000000);
      dy = 24'($signed($urandom_range(0, 2000000)) - 1000000);
      if (n % 50 == 7) begin sum = 24'sd3; dx = 24'sd8000000; end   // saturates
      if (in_valid) begin
        e.nb = (sum <= 0);
        e.x  = e.nb ? 0 : pos(longint'(dx), longint'(sum), longint'(sx));
        e.y  = e.nb ? 0 : pos(longint'(dy), longint'(sum), longint'(sy));
        e.t  = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

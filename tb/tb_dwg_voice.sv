// tb_dwg_voice: loads four wave shapes whose entries are a known
// one-to-one function of (shape, point), so each DAC code tells which
// point of which shape is being played. Checks, for divisors 3, 1 and 261,
// that the point advances by exactly one every N clocks (a full wave every
// 256*N clocks, f = f_clk / (256 N)), and that a shape-select write moves
// the output to the new shape without breaking the point sequence.
module tb_dwg_voice
  import dwg_pkg::*;
;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  host_wr_t host;
  logic [7:0] dac;

  dwg_voice dut (.clk, .rst_n, .host, .dac);

  // shape s holds point a at (a * (2s+1) + 3) mod 256: one-to-one within a
  // shape, and a different step pattern in each shape
  int inv [4] = '{1, 171, 205, 183};   // 1/(2s+1) mod 256
  function automatic logic [7:0] wave(int shape, int a);
    return 8'(a * (2 * shape + 1) + 3);
  endfunction
  function automatic int point_of(int shape, logic [7:0] d);
    return ((int'(d) - 3) * inv[shape]) & 255;
  endfunction

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); host = '{we: 1'b1, addr: a, data: d};
    @(negedge clk); host = '0;
  endtask

  // monitor
  int exp_shape = 0, exp_n = 0;
  bit armed = 0;
  int last_point = -1, since = 0, steps = 0;
  always @(posedge clk) if (armed) begin
    int p;
    p = point_of(exp_shape, dac);
    since++;
    if (p != last_point) begin
      if (last_point >= 0) begin
        checks++;
        if (p != (last_point + 1) % 256) begin
          failures++; $display("point %0d after %0d (shape %0d)", p, last_point, exp_shape);
        end
        if (steps > 0) begin
          checks++;
          if (since != exp_n) begin failures++; $display("N=%0d: point step after %0d clocks", exp_n, since); end
        end
        steps++;
      end
      last_point = p; since = 0;
    end
  end

  task automatic play(input int n, input int shape, input int points);
    armed = 0;
    wr(16'h0000, 8'(n)); wr(16'h0001, 8'(n >> 8)); wr(16'h0002, 8'(shape));
    repeat (2 * n + 4) @(negedge clk);     // let the new divisor load
    exp_n = n; exp_shape = shape; last_point = -1; steps = 0;
    armed = 1;
    repeat (points * n) @(negedge clk);
    armed = 0;
    checks++;
    if (steps < points - 2) begin failures++; $display("only %0d steps", steps); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host = '0; rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 256; a++) wr(16'h0400 + 16'(s * 256 + a), wave(s, a));
    play(3, 0, 600);
    // switch shape on the fly: the point sequence continues in shape 2
    exp_shape = 0; armed = 1;
    @(negedge clk); host = '{we: 1'b1, addr: 16'h0002, data: 8'd2};
    @(posedge clk); #1 exp_shape = 2;
    @(negedge clk); host = '0;
    repeat (300) @(negedge clk);
    armed = 0;
    play(1, 1, 300);
    play(261, 3, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

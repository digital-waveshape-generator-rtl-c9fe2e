// tb_sum_tree16: random channel values every clock, including all-255
// (the largest sum, 4080); the output must be bits 11:4 of the sum of the
// values presented exactly 4 clocks earlier.
module tb_sum_tree16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [15:0][7:0] ch;
  logic [7:0] y;
  int hist [0:4];

  sum_tree16 dut (.clk, .rst_n, .ch, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ch = '0;
    for (int i = 0; i < 5; i++) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int s; s = 0;
      for (int i = 0; i < 16; i++) begin
        ch[i] = (t % 50 == 7) ? 8'hFF : 8'($urandom);
        s += int'(ch[i]);
      end
      @(posedge clk);
      for (int i = 4; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = s;
      @(negedge clk);
      if (t >= 4) begin
        checks++;
        if (y !== 8'(hist[3] >> 4)) begin failures++; $display("t=%0d y=%0d expected %0d", t, y, hist[3] >> 4); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

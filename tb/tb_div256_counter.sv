// tb_div256_counter: random enables; the counter must equal the number of
// enables seen since reset, modulo 256, and wrap from 255 to 0.
module tb_div256_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, wraps = 0;
  logic rst_n, en;
  logic [7:0] q;
  int count;

  div256_counter dut (.clk, .rst_n, .en, .q);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; count = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (q !== 8'(count)) begin failures++; $display("q=%0d expected %0d", q, count % 256); end
      en = ($urandom % 4) != 0;
      @(posedge clk);
      if (en) begin count++; if (count % 256 == 0) wraps++; end
    end
    checks++; if (wraps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_divisor_latch: writes random bytes to the two byte latches in random
// order and checks the 16-bit divisor after every write, including writes
// with we low that must change nothing.
module tb_divisor_latch;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, we, sel;
  logic [7:0] data;
  logic [15:0] q, model;

  divisor_latch dut (.clk, .rst_n, .we, .sel, .data, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; sel = 0; data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 16'h0000;
    checks++; if (q !== model) failures++;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 1'($urandom); sel = 1'($urandom); data = 8'($urandom);
      @(negedge clk);
      if (we) begin
        if (sel) model = {data, model[7:0]};
        else     model = {model[15:8], data};
      end
      we = 0;
      checks++;
      if (q !== model) begin failures++; $display("q=%h expected %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_div_n_counter: counts the enables between terminal counts. With a
// divisor N, after the first reload every TC must come exactly N enables
// after the previous one. Enables are random (the counter's clock comes in
// irregularly in the top-octave voice). Covers N = 1, 2, 3, 17, 255, 3444
// (the C8 divisor of the top-octave table) and a 16-bit value.
module tb_div_n_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, en, tc;
  logic [15:0] n;

  div_n_counter dut (.clk, .rst_n, .en, .n, .tc);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int div, input int periods, input bit random_en);
    int since;
    int seen;
    n = 16'(div);
    // let one old period finish so the new divisor is loaded
    seen = 0;
    while (seen < 2) begin
      @(negedge clk); en = random_en ? 1'($urandom) : 1'b1;
      #1 if (tc) seen++;
    end
    since = 0; seen = 0;
    while (seen < periods) begin
      @(negedge clk); en = random_en ? 1'($urandom) : 1'b1;
      #1;
      if (en) begin
        since++;
        if (tc) begin
          checks++;
          if (since != div) begin failures++; $display("N=%0d: tc after %0d enables", div, since); end
          since = 0; seen++;
        end
      end
    end
  endtask

  initial begin
    rst_n = 0; en = 0; n = 16'd5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 10, 0);
    run(2, 10, 1);
    run(3, 10, 1);
    run(17, 10, 1);
    run(255, 5, 1);
    run(3444, 3, 0);
    run(40000, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

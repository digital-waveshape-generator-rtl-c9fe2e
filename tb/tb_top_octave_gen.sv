// tb_top_octave_gen: loads all twelve divisors of the top-octave table
// (C8 = 3444 ... B8 = 1825) and some small ones, and checks that tick comes
// exactly every N clocks. For each table row it also checks the tuning
// arithmetic at the 14417920 Hz master clock: the generated frequency
// 14417920 / N against the equal-tempered note 440 * 2^((k - 9)/12) * 16
// (k = 0 for C), which must be within 0.025 % (under half a cent).
module tb_top_octave_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, wr_we, wr_sel, tick;
  logic [7:0] wr_data;

  top_octave_gen dut (.clk, .rst_n, .wr_we, .wr_sel, .wr_data, .tick);

  int divs [12] = '{3444, 3251, 3068, 2896, 2734, 2580, 2435, 2299, 2170, 2048, 1933, 1825};

  task automatic wr(input logic sel, input logic [7:0] d);
    @(negedge clk); wr_we = 1; wr_sel = sel; wr_data = d;
    @(negedge clk); wr_we = 0;
  endtask

  task automatic measure(input int n, input int periods);
    int since, seen;
    wr(0, 8'(n)); wr(1, 8'(n >> 8));
    seen = 0;
    while (seen < 2) begin @(negedge clk); if (tick) seen++; end
    since = 0; seen = 0;
    while (seen < periods) begin
      @(negedge clk); since++;
      if (tick) begin
        checks++;
        if (since != n) begin failures++; $display("N=%0d: tick after %0d", n, since); end
        since = 0; seen++;
      end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_we = 0; wr_sel = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    measure(2, 20);
    measure(13, 20);
    measure(300, 5);
    for (int k = 0; k < 12; k++) begin
      real note, gen, err;
      measure(divs[k], 3);
      note = 440.0 * 16.0 * (2.0 ** ((real'(k) - 9.0) / 12.0));
      gen  = 14417920.0 / real'(divs[k]);
      err  = (gen > note ? gen - note : note - gen) / note * 100.0;
      checks++;
      if (err > 0.025) begin failures++; $display("note %0d: %f Hz, error %f %%", k, gen, err); end
    end
    checks++;
    if (14417920 / 2048 != 7040) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tov_voice: drives twelve top-octave clock pulse trains, clock i every
// 3 + i cycles, loads a wave RAM whose entries identify their address, and
// checks that the wave point advances once every N pulses of the selected
// clock, i.e. every N * (3 + sel) cycles, for several selects and N.
module tb_tov_voice
  import dwg_pkg::*;
;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  host_wr_t host;
  logic [11:0] to_clk;
  logic [7:0] dac;
  int cyc = 0;

  tov_voice dut (.clk, .rst_n, .host, .to_clk, .dac);

  always @(posedge clk) cyc <= cyc + 1;
  always_comb for (int i = 0; i < 12; i++) to_clk[i] = (cyc % (3 + i)) == 0;

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); host = '{we: 1'b1, addr: a, data: d};
    @(negedge clk); host = '0;
  endtask

  task automatic play(input int sel, input int n, input int steps);
    int since, seen;
    logic [7:0] last;
    wr(16'h0000, 8'(n)); wr(16'h0001, 8'(sel));
    repeat (2 * n * 15 + 4) @(negedge clk);
    last = dac; seen = -1; since = 0;
    while (seen < steps) begin
      @(negedge clk); since++;
      if (dac != last) begin
        // RAM holds 255 - address
        checks++;
        if (dac != last - 8'd1) begin failures++; $display("dac %0d after %0d", dac, last); end
        if (seen >= 0) begin
          checks++;
          if (since != n * (3 + sel)) begin
            failures++; $display("sel %0d N %0d: step after %0d cycles", sel, n, since);
          end
        end
        seen++; since = 0; last = dac;
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
    host = '0; rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) wr(16'h0100 + 16'(a), 8'(255 - a));
    play(0, 1, 300);
    play(5, 2, 100);
    play(11, 4, 50);
    play(7, 8, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

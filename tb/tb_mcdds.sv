// tb_mcdds: runs the multi-channel DDS with 4, 8 and 16 channels (lookup
// table split 4x256, 8x128, 16x64) and checks every DAC sample against a
// frame-level model written from the definition of the generator: in frame
// f each channel's phase is (f+1) * addend mod 2^32, its lookup is the
// table entry at {channel, top phase bits} and the DAC code is bits 11:4
// of the sum of all channels' lookups.
//
// Microprogram for C channels, word k: read channel k, write back channel
// k-2 (the one in latch 3), next word k+1 mod C; in word 3 the mux starts a
// new sum and latch 6 loads, since latch 4 then holds channel 0's lookup.
//
// Timing checks: a new sample every 2*C clocks (two clocks per channel
// slot), and the first sample at clock 2*C + 10 after reset: latch 6 loads
// at the end of step C+5 (step 1 runs the reset microword, step 2 word 0,
// pass 2's word 3 is step C+5), and a step ends every second clock.
module tb_mcdds
  import dwg_pkg::*;
;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  host_wr_t host;
  logic [7:0] dac;

  mcdds dut (.clk, .rst_n, .host, .dac);

  logic [7:0]  lut [1024];
  logic [31:0] addend [16];
  logic [7:0]  trace [8000];

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); host = '{we: 1'b1, addr: a, data: d};
    @(negedge clk); host = '0;
  endtask

  function automatic logic [7:0] model(int c, int mode, int f);
    int s = 0;
    for (int ch = 0; ch < c; ch++) begin
      logic [31:0] ph;
      int a;
      ph = 32'(f + 1) * addend[ch];
      a = (mode == 0) ? ch * 256 + int'(ph[31:24])
        : (mode == 1) ? ch * 128 + int'(ph[31:25]) : ch * 64 + int'(ph[31:26]);
      s += int'(lut[a]);
    end
    return 8'(s >> 4);
  endfunction

  task automatic run(input int c, input int mode, input int frames);
    int t0, n;
    rst_n = 0;
    for (int ch = 0; ch < 16; ch++) begin
      addend[ch] = (ch == 1) ? 32'd1797877 : $urandom;   // 1797877: C8 at 10 MHz
      for (int b = 0; b < 4; b++) wr(16'(ch * 4 + b), addend[ch][8*b +: 8]);
    end
    for (int k = 0; k < 16; k++) begin
      microword_t w;
      w = '0;
      w.next    = 4'((k + 1) % c);
      w.rd_ch   = 4'(k);
      w.wr_ch   = 4'((k + c - 2) % c);
      w.mux_acc = (k != 3);
      w.l6_en   = (k == 3);
      w.we_en   = 1'b1;
      wr(16'h0100 + 16'(k), w[7:0]);
      wr(16'h0110 + 16'(k), w[15:8]);
    end
    @(negedge clk); rst_n = 1;
    host = '{we: 1'b1, addr: 16'h0200, data: 8'(mode)};
    // trace index t = value after the t-th clock edge since reset release
    n = 2 * c * frames + 40 * c;
    for (int t = 1; t < n; t++) begin
      @(negedge clk); host = '0;
      trace[t] = dac;
    end
    t0 = 2 * c + 10;
    for (int f = 0; f < frames; f++) begin
      logic [7:0] m;
      m = model(c, mode, f);
      for (int k = 0; k < 2 * c; k++) begin
        checks++;
        if (trace[t0 + 2 * c * f + k] !== m) begin
          failures++;
          if (failures < 10) $display("C=%0d frame %0d clock %0d: dac %0d expected %0d", c, f, k,
                                      trace[t0 + 2 * c * f + k], m);
        end
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host = '0; rst_n = 0;
    for (int a = 0; a < 1024; a++) begin lut[a] = 8'($urandom); wr(16'h0400 + 16'(a), lut[a]); end
    run(4, 0, 300);
    run(8, 1, 150);
    run(16, 2, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

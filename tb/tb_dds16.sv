// tb_dds16: sixteen channels with random wave tables and phase
// adjustments. Reference phases advance every clock; the DAC code must be
// bits 11:4 of the sum of the sixteen table lookups, one clock for the
// channel output latch plus four for the adder tree after the phases.
module tb_dds16
  import dwg_pkg::*;
;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  host_wr_t host;
  logic [7:0] dac;
  logic [7:0] lut [16][256];
  logic [31:0] adj_m [16], acc_m [16];
  int hist [0:5];
  bit check_on = 0;

  dds16 dut (.clk, .rst_n, .host, .dac);

  always @(posedge clk) begin
    if (!rst_n) begin
      foreach (acc_m[c]) begin acc_m[c] = '0; adj_m[c] = '0; end
      foreach (hist[i]) hist[i] = 0;
    end else begin
      int s; s = 0;
      for (int c = 0; c < 16; c++) begin
        s += int'(lut[c][acc_m[c][31:24]]);
        acc_m[c] = acc_m[c] + adj_m[c];
      end
      for (int i = 5; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = s;
      if (host.we && host.addr[8:2] == 0) adj_m[host.addr[12:9]][8*host.addr[1:0] +: 8] = host.data;
    end
  end

  always @(negedge clk) if (check_on) begin
    checks++;
    if (dac !== 8'(hist[4] >> 4)) begin
      failures++; if (failures < 10) $display("dac %0d expected %0d", dac, hist[4] >> 4);
    end
  end

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); host = '{we: 1'b1, addr: a, data: d};
    @(negedge clk); host = '0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host = '0; rst_n = 0;
    for (int c = 0; c < 16; c++)
      for (int a = 0; a < 256; a++) begin
        lut[c][a] = 8'($urandom); wr(16'(c * 512 + 256 + a), lut[c][a]);
      end
    @(negedge clk); rst_n = 1;
    repeat (6) @(negedge clk);
    check_on = 1;
    for (int c = 0; c < 16; c++) begin
      logic [31:0] v;
      v = $urandom;
      for (int b = 0; b < 4; b++) wr(16'(c * 512 + b), v[8*b +: 8]);
    end
    repeat (2000) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

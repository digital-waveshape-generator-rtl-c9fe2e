// tb_dds_channel: random wave table and phase adjustments (changed byte by
// byte while the channel runs). A reference phase advances by the current
// adjustment every clock; the output must be the table entry at the top 8
// bits of the phase one clock earlier. One run uses an adjustment of 2^24,
// which must step through the table one entry per clock.
module tb_dds_channel;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, hwe;
  logic [8:0] haddr;
  logic [7:0] hdata, out;
  logic [7:0] lut [256];
  logic [31:0] adj_m, acc_m;
  logic [7:0] out_m;
  bit check_on = 0;

  dds_channel dut (.clk, .rst_n, .hwe, .haddr, .hdata, .out);

  always @(posedge clk) begin
    if (!rst_n) begin
      adj_m = '0; acc_m = '0; out_m = '0;
    end else begin
      out_m = lut[acc_m[31:24]];
      acc_m = acc_m + adj_m;
      if (hwe && haddr[8:2] == 0) adj_m[8*haddr[1:0] +: 8] = hdata;
    end
  end

  always @(negedge clk) if (check_on) begin
    checks++;
    if (out !== out_m) begin failures++; if (failures < 10) $display("out %h expected %h", out, out_m); end
  end

  task automatic wr(input logic [8:0] a, input logic [7:0] d);
    @(negedge clk); hwe = 1; haddr = a; hdata = d;
    @(negedge clk); hwe = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; hwe = 0; haddr = 0; hdata = 0;
    for (int a = 0; a < 256; a++) begin lut[a] = 8'($urandom); wr(9'h100 + 9'(a), lut[a]); end
    @(negedge clk); rst_n = 1;
    @(negedge clk); check_on = 1;
    for (int r = 0; r < 6; r++) begin
      logic [31:0] v;
      v = (r == 0) ? 32'h0100_0000 : $urandom;
      for (int b = 0; b < 4; b++) wr(9'(b), v[8*b +: 8]);
      repeat (300) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

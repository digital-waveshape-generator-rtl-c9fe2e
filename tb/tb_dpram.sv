// tb_dpram: checks the dual-port RAM at its default size (256x8) and as a
// 16x32 word RAM with byte enables, against a reference array updated by
// the testbench. Random writes and reads; reads are checked in the same
// cycle (asynchronous read port).
module tb_dpram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we8;
  logic [7:0] wa8, ra8, wd8, rd8;
  dpram u8 (.clk, .we(we8), .be(1'b1), .waddr(wa8), .wdata(wd8), .raddr(ra8), .rdata(rd8));

  logic        we32;
  logic [3:0]  be32;
  logic [3:0]  wa32, ra32;
  logic [31:0] wd32, rd32;
  dpram #(.WIDTH(32), .DEPTH(16)) u32 (.clk, .we(we32), .be(be32), .waddr(wa32), .wdata(wd32),
                                       .raddr(ra32), .rdata(rd32));

  logic [7:0]  m8 [256];
  logic [31:0] m32 [16];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we8 = 0; we32 = 0; be32 = '1; wa8 = 0; ra8 = 0; wd8 = 0; wa32 = 0; ra32 = 0; wd32 = 0;
    // fill both completely
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we8 = 1; wa8 = 8'(a); wd8 = 8'($urandom); m8[a] = wd8;
    end
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); we32 = 1; be32 = '1; wa32 = 4'(a); wd32 = $urandom; m32[a] = wd32;
    end
    @(negedge clk); we8 = 0; we32 = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we8 = 1'($urandom); wa8 = 8'($urandom); wd8 = 8'($urandom);
      we32 = 1'($urandom); be32 = 4'($urandom); wa32 = 4'($urandom); wd32 = $urandom;
      ra8 = 8'($urandom); ra32 = 4'($urandom);
      #1;
      checks++; if (rd8 !== m8[ra8]) begin failures++; $display("8-bit read %0d: %h /= %h", ra8, rd8, m8[ra8]); end
      checks++; if (rd32 !== m32[ra32]) begin failures++; $display("32-bit read %0d: %h /= %h", ra32, rd32, m32[ra32]); end
      @(posedge clk);
      if (we8) m8[wa8] = wd8;
      if (we32) for (int b = 0; b < 4; b++) if (be32[b]) m32[wa32][8*b +: 8] = wd32[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

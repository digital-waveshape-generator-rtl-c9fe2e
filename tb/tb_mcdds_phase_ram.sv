// tb_mcdds_phase_ram: after reset every phase reads 0; then random writes
// and reads are checked against a reference array.
module tb_mcdds_phase_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, we;
  logic [3:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] m [16];

  mcdds_phase_ram dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; waddr = 0; wdata = 0; raddr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin
      m[a] = '0; raddr = 4'(a); #1;
      checks++; if (rdata !== 32'd0) begin failures++; $display("phase %0d not reset", a); end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom; raddr = 4'($urandom);
      #1;
      checks++; if (rdata !== m[raddr]) begin failures++; $display("read %0d: %h /= %h", raddr, rdata, m[raddr]); end
      @(posedge clk);
      if (we) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

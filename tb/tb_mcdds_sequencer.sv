// tb_mcdds_sequencer: loads random microwords whose next fields form
// random loops, steps the sequencer on random cycles and checks each
// latched microword against a model that follows the next pointers
// through a copy of the two RAMs. Also rewrites words while it runs
// (dual-port RAM) and checks that the change is followed.
module tb_mcdds_sequencer
  import dwg_pkg::*;
;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, step, hwe, hsel;
  logic [3:0] haddr;
  logic [7:0] hdata;
  microword_t uw;
  logic [15:0] mem [16];
  logic [15:0] model;

  mcdds_sequencer dut (.clk, .rst_n, .step, .hwe, .hsel, .haddr, .hdata, .uw);

  task automatic wr(input logic sel, input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); hwe = 1; hsel = sel; haddr = a; hdata = d;
    @(negedge clk); hwe = 0;
    if (sel) mem[a][15:8] = d; else mem[a][7:0] = d;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; step = 0; hwe = 0; hsel = 0; haddr = 0; hdata = 0;
    for (int a = 0; a < 16; a++) begin
      logic [15:0] w;
      w = 16'($urandom);
      w[3:0] = 4'((a + 1 + ($urandom % 3)) % 16);
      wr(0, 4'(a), w[7:0]); wr(1, 4'(a), w[15:8]);
    end
    @(negedge clk); rst_n = 1;
    model = '0;
    checks++; if (uw !== microword_t'(model)) failures++;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i == 300) begin
        // change the loop on the fly
        hwe = 1; hsel = 0; haddr = 4'd5; hdata = 8'hA0;  // word 5 -> next 0
        mem[5][7:0] = 8'hA0;
        @(negedge clk); hwe = 0;
      end
      step = 1'($urandom);
      @(negedge clk);
      if (step) model = mem[model[3:0]];
      step = 0;
      checks++;
      if (uw !== microword_t'(model)) begin failures++; $display("uw=%h expected %h", uw, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clock_mux12: every select value against random clock patterns; the
// output must be the selected clock, and 0 for select values 12 to 15.
module tb_clock_mux12;
  int checks = 0, failures = 0;
  logic [11:0] clks;
  logic [3:0] sel;
  logic y;

  clock_mux12 dut (.clks, .sel, .y);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      clks = 12'($urandom); sel = 4'(i % 16);
      #1;
      checks++;
      if (y !== (sel < 12 ? clks[sel] : 1'b0)) begin
        failures++; $display("sel=%0d clks=%h y=%b", sel, clks, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

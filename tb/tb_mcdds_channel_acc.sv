// tb_mcdds_channel_acc: feeds random lookups, one per step, in frames of
// 4, 8 and 16 channels. The mux restarts the sum and latch 6 loads on the
// first step of each frame. Checks latch 5 after every step against a
// running sum, and the DAC code after each frame against the top 8 bits of
// the finished 12-bit sum, which must then hold for the whole next frame.
module tb_mcdds_channel_acc;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, step, mux_acc, l6_en;
  logic [7:0] lookup, dac;
  logic [11:0] sum;
  int model_sum, model_dac;

  mcdds_channel_acc dut (.clk, .rst_n, .step, .lookup, .mux_acc, .l6_en, .sum, .dac);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; step = 0; mux_acc = 0; l6_en = 0; lookup = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model_sum = 0; model_dac = 0;
    for (int f = 0; f < 60; f++) begin
      int c;
      c = (f < 20) ? 4 : (f < 40) ? 8 : 16;
      for (int k = 0; k < c; k++) begin
        @(negedge clk);
        // idle cycle between steps: nothing may change
        step = 0; lookup = 8'($urandom); mux_acc = 1'($urandom); l6_en = 1'($urandom);
        @(negedge clk);
        checks++; if (sum !== 12'(model_sum)) begin failures++; $display("sum moved without step"); end
        step = 1; lookup = (f % 5 == 0) ? 8'hFF : 8'($urandom);
        mux_acc = (k != 0); l6_en = (k == 0);
        @(negedge clk);
        if (k == 0) model_dac = (model_sum >> 4) & 255;
        model_sum = (k == 0 ? 0 : model_sum) + int'(lookup);
        step = 0;
        checks++; if (sum !== 12'(model_sum)) begin failures++; $display("sum %0d expected %0d", sum, model_sum); end
        checks++; if (dac !== 8'(model_dac)) begin failures++; $display("dac %0d expected %0d", dac, model_dac); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mcdds_channel_acc: the channel summer at the end of the multi-channel DDS
// pipeline (adder, 2:1 mux, latch 5 and latch 6).
//
// One channel's lookup value arrives in latch 4 per pipeline step. The
// adder adds it to the 2:1 mux output, which is latch 5 (running sum) or 0
// (start of a new sum), and latch 5 takes the result at the end of the
// step. When latch 5 holds the sum of all channels, latch 6 takes 8 of its
// 12 bits for the DAC and holds them for a whole frame; this happens on the
// same step that the mux restarts the sum. The document prints the widths
// (8 in, 12-bit sum, 8 out) but not which 8 bits reach the DAC; OUT_SHIFT
// = 4 takes the top 8 bits, so 16 full-scale channels fill the DAC range.
module mcdds_channel_acc #(
  parameter int unsigned SUM_W     = 12,
  parameter int unsigned OUT_SHIFT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic [7:0]       lookup,
  input  logic             mux_acc,
  input  logic             l6_en,
  output logic [SUM_W-1:0] sum,
  output logic [7:0]       dac
);
  logic [SUM_W-1:0] mux_y;

  assign mux_y = mux_acc ? sum : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum <= '0;
      dac <= '0;
    end else if (step) begin
      sum <= mux_y + SUM_W'(lookup);
      if (l6_en) dac <= sum[OUT_SHIFT +: 8];
    end
  end
endmodule

// clock_mux12: the 12-to-1 multiplexer of a top-octave voice. It selects one
// of the twelve top-octave clocks (one per note C..B) with the 4 select bits
// held in the voice's divisor latch. Here the top-octave clocks are one-cycle
// enable pulses in the voice's clk domain, so the mux is plain logic and
// glitch-free. Select values 12..15 select nothing (output 0), which is this
// implementation's choice.
module clock_mux12 #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0] clks,
  input  logic [3:0]   sel,
  output logic         y
);
  always_comb begin
    y = 1'b0;
    for (int i = 0; i < int'(N); i++) if (sel == 4'(i)) y = clks[i];
  end
endmodule

// top_octave_gen: one of the twelve top-octave clock generators.
//
// A 16-bit divisor latch, written as two bytes, sets N; a divide-by-N
// counter running on every master clock pulses tick once every N cycles,
// giving the note frequency f_clk / N (for example 14417920 Hz / 2048 =
// 7040 Hz, the note A8). In the document this note clock goes to a PLL that
// multiplies it by 256 for the voice modules; the PLL is analog and is not
// part of this module. Interface: wr_we / wr_sel / wr_data write divisor
// byte wr_sel. Timing: tick is a one-cycle pulse.
module top_octave_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_we,
  input  logic       wr_sel,
  input  logic [7:0] wr_data,
  output logic       tick
);
  logic [DIV_W-1:0] divisor;

  divisor_latch #(.BYTES(DIV_W / 8)) u_div_latch (
    .clk, .rst_n, .we(wr_we), .sel(wr_sel), .data(wr_data), .q(divisor)
  );

  div_n_counter #(.W(DIV_W)) u_div_n (
    .clk, .rst_n, .en(1'b1), .n(divisor), .tc(tick)
  );
endmodule

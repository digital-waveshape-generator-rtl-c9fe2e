// div_n_counter: the divide-by-N counter with its count & reload logic.
//
// The counter is parallel-loaded with the divisor N and counts down; when
// it reaches the end of its count it raises TC, and the reload logic loads
// N again on the next count. Each count enable (the counter's clock in the
// original boards; here a one-cycle enable in the clk domain) moves it one
// step, so tc pulses once every N enables. The counter runs N-1 down to 0
// so that the period is exactly N, as the document's divisor table needs
// (a divisor of 2048 gives 7040 Hz from 14417920 Hz). N = 0 and N = 1 both
// give a tc on every enable.
//
// Timing: tc is combinational, high while the count is 0 and en is high.
// A new N takes effect at the next reload.
module div_n_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] n,
  output logic         tc
);
  logic [W-1:0] cnt;

  assign tc = en && (cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n)        cnt <= '0;
    else if (en) begin
      if (cnt == '0)   cnt <= (n == '0) ? '0 : n - 1'b1;  // reload (PL)
      else             cnt <= cnt - 1'b1;
    end
  end
endmodule

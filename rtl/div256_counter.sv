// div256_counter: the divide-by-256 counter of the divider voices. Each TC
// of the divide-by-N counter advances it by one; its 8-bit value is the
// address of the wave-shape RAM, so it steps through the 256 points of the
// wave once per output period. Interface: en advances q on the clock edge;
// q wraps from 255 to 0. W is the counter width (8 in the document).
module div256_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= q + 1'b1;
  end
endmodule

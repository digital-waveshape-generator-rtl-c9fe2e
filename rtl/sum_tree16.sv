// sum_tree16: the 16-channel pipelined summing network of the FPGA form.
//
// Sixteen 8-bit channel values are added in a tree of four levels: eight
// 8-bit adders (9-bit sums), four 9-bit adders (10 bits), two 10-bit
// adders (11 bits) and one 11-bit adder (12 bits). A latch follows every
// adder, so a long carry chain never sits in one cycle; the last latch
// keeps 8 bits of the 12-bit sum for the DAC. The adder widths and the
// latches follow the document; which 8 bits reach the DAC is not given,
// and the top 8 (sum bits 11:4) are taken here.
// Timing: y is the sum of the ch values presented 4 cycles earlier.
module sum_tree16 #(
  parameter int unsigned CH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CH-1:0][7:0] ch,
  output logic [7:0]       y
);
  logic [7:0][8:0]  s1;
  logic [3:0][9:0]  s2;
  logic [1:0][10:0] s3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
      y  <= '0;
    end else begin
      for (int i = 0; i < 8; i++) s1[i] <= {1'b0, ch[2*i]} + {1'b0, ch[2*i+1]};
      for (int i = 0; i < 4; i++) s2[i] <= {1'b0, s1[2*i]} + {1'b0, s1[2*i+1]};
      for (int i = 0; i < 2; i++) s3[i] <= {1'b0, s2[2*i]} + {1'b0, s2[2*i+1]};
      y <= 8'(({1'b0, s3[0]} + {1'b0, s3[1]}) >> 4);
    end
  end
endmodule

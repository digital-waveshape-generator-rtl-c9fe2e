// divisor_latch: the divisor register of the divider voices, built in the
// original from a pair of 8-bit latches that the microprocessor writes one
// at a time, so a 16-bit divisor is loaded with two 8-bit writes.
//
// Interface: a write with sel = b stores data in byte b of q. BYTES sets
// the number of byte latches (2 in the original). Timing: q changes on the
// clock edge of the write. Reset to zero is this implementation's choice.
module divisor_latch #(
  parameter int unsigned BYTES = 2,
  localparam int unsigned SW = (BYTES > 1) ? $clog2(BYTES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [SW-1:0]      sel,
  input  logic [7:0]         data,
  output logic [8*BYTES-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else if (we && int'(sel) < int'(BYTES)) q[8*sel +: 8] <= data;
  end
endmodule

// dds_channel: one channel of the FPGA form of the generator, a plain
// direct-digital-synthesis oscillator.
//
// Every clk cycle the 32-bit phase adjustment (the addend) is added to the
// 32-bit phase accumulator latch. The top 8 phase bits address a 256x8
// lookup table DPRAM holding the wave shape, and the channel output latch
// registers the table entry for the channel summer. The output frequency is
// addend * f_clk / 2^32. Structure and widths follow the document; the
// register map, byte writes and reset to zero are this implementation's.
//
// Host port: hwe writes hdata at haddr:
//   0x000-0x003  phase adjustment bytes 0 (bits 7:0) .. 3 (bits 31:24)
//   0x100-0x1FF  lookup table
// Timing: out is the table entry for the phase held one cycle earlier.
module dds_channel #(
  parameter int unsigned PHASE_W = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hwe,
  input  logic [8:0] haddr,
  input  logic [7:0] hdata,
  output logic [7:0] out
);
  localparam int unsigned NB = PHASE_W / 8;

  logic [PHASE_W-1:0] adj, acc;
  logic [7:0]         lut_q;

  always_ff @(posedge clk) begin
    if (!rst_n) adj <= '0;
    else if (hwe && haddr[8:2] == '0 && int'(haddr[1:0]) < int'(NB)) adj[8*haddr[1:0] +: 8] <= hdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      out <= '0;
    end else begin
      acc <= acc + adj;
      out <= lut_q;
    end
  end

  dpram #(.WIDTH(8), .DEPTH(256)) u_lut (
    .clk,
    .we   (hwe && haddr[8]),
    .be   (1'b1),
    .waddr(haddr[7:0]),
    .wdata(hdata),
    .raddr(acc[PHASE_W-1 -: 8]),
    .rdata(lut_q)
  );
endmodule

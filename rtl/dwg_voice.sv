// dwg_voice: the original single-voice Digital Waveshape Generator.
//
// The master clock is divided by a 16-bit divisor N to give 256 times the
// note frequency; each terminal count of that divide-by-N counter advances
// a divide-by-256 counter whose value addresses the wave-shape RAM, and the
// RAM's 8-bit output is the sample sent to the DAC. The output frequency is
// f_clk / (256 * N). The RAM holds four 256-point wave shapes (a 1024x8
// part); a shape-select register picks one, so the voice can switch shapes
// at once. All of this follows the document except the register map and
// the shape-select register, which are this implementation's choices.
//
// Host register map (byte writes on host):
//   0x0000  divisor bits 7:0      0x0001  divisor bits 15:8
//   0x0002  wave shape select (bits 1:0)
//   0x0400-0x07FF  wave RAM, address = {shape, point}
// Timing: dac follows the RAM asynchronously; it changes the cycle after
// the divide-by-N counter's terminal count.
module dwg_voice
  import dwg_pkg::*;
#(
  parameter int unsigned DIV_W  = 16,
  parameter int unsigned SHAPES = 4,
  localparam int unsigned SW = (SHAPES > 1) ? $clog2(SHAPES) : 1,
  localparam int unsigned RAM_AW = 8 + $clog2(SHAPES)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  host_wr_t host,
  output logic [7:0] dac
);
  logic [DIV_W-1:0] divisor;
  logic             tc;
  logic [7:0]       point;
  logic [SW-1:0]    shape;

  divisor_latch #(.BYTES(DIV_W / 8)) u_div_latch (
    .clk, .rst_n,
    .we  (host.we && host.addr[15:$clog2(DIV_W / 8)] == '0),
    .sel (host.addr[$clog2(DIV_W / 8) - 1:0]),
    .data(host.data),
    .q   (divisor)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) shape <= '0;
    else if (host.we && host.addr == 16'h0002) shape <= host.data[SW-1:0];
  end

  div_n_counter #(.W(DIV_W)) u_div_n (
    .clk, .rst_n, .en(1'b1), .n(divisor), .tc
  );

  div256_counter #(.W(8)) u_div256 (
    .clk, .rst_n, .en(tc), .q(point)
  );

  logic [RAM_AW-1:0] raddr;
  if (SHAPES > 1) begin : g_shapes
    assign raddr = {shape, point};
  end else begin : g_one
    assign raddr = point;
  end

  dpram #(.WIDTH(8), .DEPTH(256 * SHAPES)) u_wave_ram (
    .clk,
    .we   (host.we && host.addr[15:10] == 6'd1),
    .be   (1'b1),
    .waddr(host.addr[RAM_AW-1:0]),
    .wdata(host.data),
    .raddr,
    .rdata(dac)
  );
endmodule

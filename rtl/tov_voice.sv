// tov_voice: a voice module of the top-octave scheme.
//
// Twelve top-octave clocks run at 256 times the notes C8..B8. The voice
// picks one with a 12-to-1 clock multiplexer and divides it by an 8-bit N
// (a power of two picks the octave) to get 256 times its note; the result
// steps a divide-by-256 counter through a 256x8 wave RAM. The 4 select bits
// and the 8 divisor bits sit in one divisor latch, as in the document's
// diagram. Here the top-octave clocks are one-cycle enable pulses in the
// clk domain; that, and the register map, are this implementation's choices.
//
// Host register map: 0x0000 divisor N (8 bits), 0x0001 clock select
// (bits 3:0, 0 = C ... 11 = B), 0x0100-0x01FF wave RAM.
module tov_voice
  import dwg_pkg::*;
#(
  parameter int unsigned DIV_W = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  host_wr_t    host,
  input  logic [11:0] to_clk,
  output logic [7:0]  dac
);
  logic [15:0] latch_q;   // {unused, select[3:0], divisor[7:0]}
  logic        sel_clk;
  logic        tc;
  logic [7:0]  point;

  divisor_latch #(.BYTES(2)) u_div_latch (
    .clk, .rst_n,
    .we  (host.we && host.addr[15:1] == '0),
    .sel (host.addr[0]),
    .data(host.data),
    .q   (latch_q)
  );

  clock_mux12 #(.N(12)) u_mux (
    .clks(to_clk), .sel(latch_q[11:8]), .y(sel_clk)
  );

  div_n_counter #(.W(DIV_W)) u_div_n (
    .clk, .rst_n, .en(sel_clk), .n(latch_q[DIV_W-1:0]), .tc
  );

  div256_counter #(.W(8)) u_div256 (
    .clk, .rst_n, .en(tc), .q(point)
  );

  dpram #(.WIDTH(8), .DEPTH(256)) u_wave_ram (
    .clk,
    .we   (host.we && host.addr[15:8] == 8'h01),
    .be   (1'b1),
    .waddr(host.addr[7:0]),
    .wdata(host.data),
    .raddr(point),
    .rdata(dac)
  );
endmodule

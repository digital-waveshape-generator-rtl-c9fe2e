// dds16: the FPGA form of the generator, sixteen single-channel DDS units
// (dds_channel) feeding the pipelined summing network (sum_tree16) whose
// 8-bit output drives the DAC. Every channel runs at the full clk rate, so
// each has its own sample rate f_clk and its own 256-point wave shape.
//
// Host register map: address bits 12:9 select the channel, bits 8:0 are
// the channel's own map (0x000-0x003 phase adjustment, 0x100-0x1FF lookup
// table). Timing: dac lags the channel phases by 1 + 4 cycles.
module dds16
  import dwg_pkg::*;
#(
  parameter int unsigned CH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  host_wr_t   host,
  output logic [7:0] dac
);
  logic [CH-1:0][7:0] chan;

  for (genvar i = 0; i < int'(CH); i++) begin : g_ch
    dds_channel #(.PHASE_W(32)) u_ch (
      .clk, .rst_n,
      .hwe  (host.we && host.addr[15:9] == 7'(i)),
      .haddr(host.addr[8:0]),
      .hdata(host.data),
      .out  (chan[i])
    );
  end

  sum_tree16 #(.CH(CH)) u_sum (
    .clk, .rst_n, .ch(chan), .y(dac)
  );
endmodule

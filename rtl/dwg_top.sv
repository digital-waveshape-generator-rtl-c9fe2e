// dwg_top: the four waveshape-generator designs side by side.
//
//  * dwg_voice    the original divider voice: f = f_clk / (256 * N)
//  * top octave   twelve top_octave_gen dividers making the note clocks
//                 C8..B8 from one master clock, and one tov_voice that
//                 selects a top-octave clock and divides it down
//  * mcdds        the multi-channel time-sliced DDS
//  * dds16        the FPGA form: 16 DDS channels and a pipelined adder tree
//
// Each design has its own clock and its own byte-wide host write bus, and
// brings out the 8-bit code for its DAC. The analog parts are outside:
// the DACs, and the PLLs that multiply each top-octave note clock by 256.
// to_note_tick carries the twelve note-frequency pulses to those PLLs, and
// to_clk brings their outputs back (as one-cycle pulses in clk_to's domain)
// to the voice. The top-octave generators are written at host_tog
// addresses 2*note + byte (note 0 = C .. 11 = B).
module dwg_top
  import dwg_pkg::*;
(
  input  logic        rst_n,
  // original DWG voice
  input  logic        clk_dwg,
  input  host_wr_t    host_dwg,
  output logic [7:0]  dac_dwg,
  // top-octave clock generators and voice
  input  logic        clk_to,
  input  host_wr_t    host_tog,
  output logic [11:0] to_note_tick,
  input  logic [11:0] to_clk,
  input  host_wr_t    host_tov,
  output logic [7:0]  dac_tov,
  // multi-channel DDS
  input  logic        clk_mcdds,
  input  host_wr_t    host_mcdds,
  output logic [7:0]  dac_mcdds,
  // FPGA 16-channel DDS
  input  logic        clk_dds16,
  input  host_wr_t    host_dds16,
  output logic [7:0]  dac_dds16
);
  dwg_voice u_dwg (
    .clk(clk_dwg), .rst_n, .host(host_dwg), .dac(dac_dwg)
  );

  for (genvar i = 0; i < 12; i++) begin : g_tog
    top_octave_gen u_gen (
      .clk    (clk_to), .rst_n,
      .wr_we  (host_tog.we && host_tog.addr[15:1] == 15'(i)),
      .wr_sel (host_tog.addr[0]),
      .wr_data(host_tog.data),
      .tick   (to_note_tick[i])
    );
  end

  tov_voice u_tov (
    .clk(clk_to), .rst_n, .host(host_tov), .to_clk, .dac(dac_tov)
  );

  mcdds u_mcdds (
    .clk(clk_mcdds), .rst_n, .host(host_mcdds), .dac(dac_mcdds)
  );

  dds16 u_dds16 (
    .clk(clk_dds16), .rst_n, .host(host_dds16), .dac(dac_dds16)
  );
endmodule

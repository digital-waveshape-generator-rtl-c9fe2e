// mcdds: the multi-channel, time-sliced Digital Waveshape Generator.
//
// One set of hardware serves up to 16 direct-digital-synthesis channels in
// turn. Each channel has a 32-bit phase addend (in the addend DPRAM) and a
// 32-bit phase (in the phase accumulator RAM). Per channel time slot the
// pipeline moves one stage:
//   latch 1 / latch 2  addend and phase of the channel read in this slot
//   latch 3            their sum, the new phase, written back to the phase RAM
//   latch 4            lookup table entry addressed by the top phase bits
//   latch 5            running sum of the channels' lookups (2:1 mux clears it)
//   latch 6            finished sum of all channels, the DAC sample
// A channel read in slot t is in latch 3 in slot t+1 (written back in slot
// t+2's write half), its lookup in latch 4 at the end of slot t+2 and is
// added into latch 5 at the end of slot t+3. The programmable sequencer
// supplies per slot the read channel, the write-back channel, the mux
// select, the latch 6 load and the write enable, so the microprogram sets
// the number of channels (its loop length) and the slot order.
//
// A pipeline step (slot) is two clk cycles, a write half then a read half,
// as in the document's timing diagram where the phase RAM address changes
// twice per pipeline clock (write channel, then next read channel). Each
// channel's sample rate is f_clk / (2 * channels) and its frequency
// addend * sample rate / 2^32. The 1024x8 lookup table is shared out as
// 4 channels x 256, 8 x 128 or 16 x 64 samples by lut_mode; the bank is
// the channel number of latch 3. The memory sizes and the pipeline are the
// document's; the register map, the lut_mode register, the two-cycle step
// and the microword layout are this implementation's choices.
//
// Host register map (byte writes on host):
//   0x0000-0x003F  addend DPRAM, address = {channel, byte}
//   0x0100-0x010F  sequencer RAM 0 (microword bits 7:0)
//   0x0110-0x011F  sequencer RAM 1 (microword bits 15:8)
//   0x0200         lut_mode (lut_mode_e)
//   0x0400-0x07FF  lookup table DPRAM
module mcdds
  import dwg_pkg::*;
#(
  parameter int unsigned PHASE_W   = 32,
  parameter int unsigned CH        = 16,
  parameter int unsigned SEQ_N     = 16,
  parameter int unsigned LUT_DEPTH = 1024,
  parameter int unsigned SUM_W     = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  host_wr_t   host,
  output logic [7:0] dac
);
  localparam int unsigned CAW = $clog2(CH);
  localparam int unsigned LAW = $clog2(LUT_DEPTH);
  localparam int unsigned NB  = PHASE_W / 8;

  // ---- pipeline clock: ph = 0 write half, ph = 1 read half -------------
  logic ph, step;
  always_ff @(posedge clk) begin
    if (!rst_n) ph <= 1'b0;
    else        ph <= ~ph;
  end
  assign step = ph;

  // Pipeline fill: latch 3 holds no channel's new phase until the third
  // step after reset, so write-back is held off until then. Any program
  // that starts at word 0 then runs cleanly from reset.
  logic [1:0] fill;
  logic       filled;
  always_ff @(posedge clk) begin
    if (!rst_n)                fill <= '0;
    else if (step && !filled)  fill <= fill + 1'b1;
  end
  assign filled = (fill == 2'd3);

  // ---- sequencer --------------------------------------------------------
  microword_t uw;
  mcdds_sequencer #(.N(SEQ_N)) u_seq (
    .clk, .rst_n, .step,
    .hwe  (host.we && host.addr[15:5] == 11'h008),
    .hsel (host.addr[4]),
    .haddr(host.addr[$clog2(SEQ_N)-1:0]),
    .hdata(host.data),
    .uw
  );

  lut_mode_e lut_mode;
  always_ff @(posedge clk) begin
    if (!rst_n) lut_mode <= LUT_4CH;
    else if (host.we && host.addr == 16'h0200) lut_mode <= lut_mode_e'(host.data[1:0]);
  end

  // ---- addend DPRAM and phase accumulator RAM ---------------------------
  logic [PHASE_W-1:0] addend_q, phase_q;
  logic [PHASE_W-1:0] latch1, latch2, latch3;

  dpram #(.WIDTH(PHASE_W), .DEPTH(CH)) u_addend (
    .clk,
    .we   (host.we && host.addr[15:CAW+2] == '0),
    .be   (NB'(1) << host.addr[1:0]),
    .waddr(host.addr[CAW+1:2]),
    .wdata({NB{host.data}}),
    .raddr(uw.rd_ch[CAW-1:0]),
    .rdata(addend_q)
  );

  mcdds_phase_ram #(.CH(CH), .W(PHASE_W)) u_phase (
    .clk, .rst_n,
    .we   (!ph && uw.we_en && filled),
    .waddr(uw.wr_ch[CAW-1:0]),
    .wdata(latch3),
    .raddr(uw.rd_ch[CAW-1:0]),
    .rdata(phase_q)
  );

  // ---- latches 1-3 and the 32-bit phase adder ---------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      latch1 <= '0;
      latch2 <= '0;
      latch3 <= '0;
    end else if (step) begin
      latch1 <= addend_q;
      latch2 <= phase_q;
      latch3 <= latch1 + latch2;
    end
  end

  // Microprogram rule: the channel written back in a step (and used as the
  // table bank) must be the one read two steps earlier, now in latch 3.
  logic [3:0] rd_d1, rd_d2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_d1 <= '0;
      rd_d2 <= '0;
    end else if (step) begin
      rd_d1 <= uw.rd_ch;
      rd_d2 <= rd_d1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && !ph && filled && uw.we_en)
      assert (uw.wr_ch == rd_d2)
        else $error("microword writes back channel %0d but latch 3 holds channel %0d", uw.wr_ch, rd_d2);
  end

  // ---- lookup table DPRAM and latch 4 -----------------------------------
  logic [LAW-1:0] lut_addr;
  logic [7:0]     lut_q, latch4;

  always_comb begin
    unique case (lut_mode)
      LUT_8CH:  lut_addr = LAW'({uw.wr_ch[2:0], latch3[PHASE_W-1 -: LAW-3]});
      LUT_16CH: lut_addr = LAW'({uw.wr_ch[3:0], latch3[PHASE_W-1 -: LAW-4]});
      default:  lut_addr = LAW'({uw.wr_ch[1:0], latch3[PHASE_W-1 -: LAW-2]});
    endcase
  end

  dpram #(.WIDTH(8), .DEPTH(LUT_DEPTH)) u_lut (
    .clk,
    .we   (host.we && host.addr[15:LAW] == (16-LAW)'(1)),
    .be   (1'b1),
    .waddr(host.addr[LAW-1:0]),
    .wdata(host.data),
    .raddr(lut_addr),
    .rdata(lut_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    latch4 <= '0;
    else if (step) latch4 <= lut_q;
  end

  // ---- channel summer: adder, 2:1 mux, latch 5, latch 6 -----------------
  logic [SUM_W-1:0] sum;
  mcdds_channel_acc #(.SUM_W(SUM_W), .OUT_SHIFT(SUM_W - 8)) u_acc (
    .clk, .rst_n, .step,
    .lookup (latch4),
    .mux_acc(uw.mux_acc),
    .l6_en  (uw.l6_en),
    .sum,
    .dac
  );
endmodule

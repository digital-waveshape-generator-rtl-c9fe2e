// mcdds_sequencer: the programmable microsequencer of the multi-channel
// DDS.
//
// Two Nx8 dual-port RAMs hold the microprogram; their outputs are caught in
// two 8-bit latches, whose 16 bits are the control outputs (microword_t).
// Four of the latch outputs are fed back to both RAMs as address bits 0-3,
// so each word names its successor and the loop length sets how many
// channels the generator serves. Address bits above 3 are tied to zero.
//
// The latches load once per pipeline step (step high), i.e. one microword
// per channel time slot; the original draws the latches on the master
// clock, and one word per master clock would not give the 32 slots that 16
// channels need with 4 address bits, so this stepping is this
// implementation's reading. Reset clears the latches, so the first step
// fetches word 0. Host port: hwe writes hdata into RAM hsel (0: bits 7:0,
// 1: bits 15:8) at haddr.
module mcdds_sequencer
  import dwg_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          hwe,
  input  logic          hsel,
  input  logic [AW-1:0] haddr,
  input  logic [7:0]    hdata,
  output microword_t    uw
);
  logic [AW-1:0] addr;
  logic [7:0]    q0, q1;

  assign addr = AW'(uw.next);

  dpram #(.WIDTH(8), .DEPTH(N)) u_ram0 (
    .clk, .we(hwe && !hsel), .be(1'b1), .waddr(haddr), .wdata(hdata),
    .raddr(addr), .rdata(q0)
  );

  dpram #(.WIDTH(8), .DEPTH(N)) u_ram1 (
    .clk, .we(hwe && hsel), .be(1'b1), .waddr(haddr), .wdata(hdata),
    .raddr(addr), .rdata(q1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    uw <= '0;
    else if (step) uw <= microword_t'({q1, q0});
  end
endmodule

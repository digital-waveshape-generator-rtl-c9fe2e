// dpram: dual-port RAM used for the wave-shape RAM, the addend and lookup
// table DPRAMs and the microsequencer RAMs.
//
// Port A is the microprocessor side: a synchronous write with one enable
// per byte, so a processor with an 8-bit bus can fill a wide word a byte at
// a time. Port B is the read side used by the generator: an asynchronous
// read, like the static RAMs of the original boards, so rdata follows
// raddr in the same cycle. The document gives the parts and their sizes
// (256x8, 1024x8, Nx8); the byte enables and the read timing are this
// implementation's choice. Contents are not reset, as in a real RAM.
module dpram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned NB = (WIDTH + 7) / 8
) (
  input  logic             clk,
  input  logic             we,
  input  logic [NB-1:0]    be,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < NB; b++) begin
        if (be[b]) begin
          for (int i = 8 * b; i < 8 * b + 8 && i < int'(WIDTH); i++) mem[waddr][i] <= wdata[i];
        end
      end
    end
  end

  assign rdata = mem[raddr];
endmodule

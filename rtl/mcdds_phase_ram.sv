// mcdds_phase_ram: the phase accumulator RAM of the multi-channel DDS, one
// W-bit phase per channel. Unlike the other memories it has no processor
// port. The generator writes latch 3 (the new phase) back in the first,
// write, half of a pipeline step and reads the next channel's phase in the
// second half. Interface: synchronous write (we, waddr, wdata), asynchronous
// read (raddr, rdata). Reset clears every phase to zero so that all
// channels start in step; that is this implementation's choice.
module mcdds_phase_ram #(
  parameter int unsigned CH = 16,
  parameter int unsigned W  = 32,
  localparam int unsigned AW = $clog2(CH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [CH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(CH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule

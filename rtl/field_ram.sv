// field_ram: one memory bank of the memory module.
//
// Holds one word per grid cell (or per time step for the input signal). It
// has one write port and one read port, both clocked: a read address given
// in cycle t returns its word in cycle t+1, and a write is stored at the end
// of the cycle it is given in. When the same address is read and written in
// one cycle the read returns the old word. The machine this models keeps its
// fields in external SRAM chips; here the bank is an array that an FPGA tool
// maps to block RAM, with the separate read and write ports being this
// design's choice so that a cell can be read while an earlier cell's result
// is written back.
module field_ram #(
  parameter int unsigned AW = 8,   // address width, depth is 2**AW
  parameter int unsigned W  = 16   // word width
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

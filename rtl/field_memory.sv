// field_memory: all storage of one field component (one column of the
// memory module).
//
// The component is kept three times, in Memory1..Memory3, written with the
// same word at the same address. Each copy has its own read address, so the
// cell's own value and the two neighbours that the curl needs come out in the
// same cycle: for e_x the copies are read at (i,j,k), (i,j+1,k) and
// (i,j,k+1), for b_x at (i,j,k), (i,j-1,k) and (i,j,k-1), and so on as the
// data selector forms the addresses. Memory4 holds the PML split part of the
// component (e_xy, e_yz, e_zx, b_xy, b_yz or b_zx) and is read at the cell's
// own address. The three-copy layout and the Memory4 contents follow the
// memory map of the machine; read latency is one clock (see field_ram).
module field_memory
  import fdtd_pkg::*;
#(
  parameter int unsigned AW = DEF_XW + DEF_YW + DEF_ZW
) (
  input  logic          clk,
  // write port: all three copies
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  field_t        wdata,
  // write port: PML split part
  input  logic          split_we,
  input  field_t        split_wdata,
  // read ports: raddr[0] = own cell, raddr[1..2] = neighbours
  input  logic [AW-1:0] raddr [3],
  output field_t        rdata [3],
  output field_t        split_rdata
);

  for (genvar m = 0; m < 3; m++) begin : g_copy
    field_ram #(.AW(AW), .W(DATA_W)) u_copy (
      .clk  (clk),
      .we   (we),
      .waddr(waddr),
      .wdata(wdata),
      .raddr(raddr[m]),
      .rdata(rdata[m])
    );
  end

  field_ram #(.AW(AW), .W(DATA_W)) u_split (
    .clk  (clk),
    .we   (split_we),
    .waddr(waddr),
    .wdata(split_wdata),
    .raddr(raddr[0]),
    .rdata(split_rdata)
  );

endmodule

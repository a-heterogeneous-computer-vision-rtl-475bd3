// chip_ram -- the off-chip RAM beside each GLiTCH chip, on the 32-bit path
// between the data routing network and the chip's pattern pins.
//
// It holds 16-digit ternary patterns (32 bits each): partial results read
// out of the chip can be parked here and later fed back to the chip as
// patterns through the routing network.  Simple dual port: a synchronous
// read port (data one clock after re) and a write
// port, so a read and a write from different pipeline stages never collide.
//
// From the design: a RAM attached to each chip's routing link, holding
// partial results.  Own choices: the 32-bit word (the width of the link),
// the depth (1 kword) and the two ports.  Contents are not reset.
module chip_ram
  import apa_pkg::*;
#(
  parameter int unsigned AW = RAM_AW
) (
  input  logic              clk,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [BUS_W-1:0]  rdata,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [BUS_W-1:0]  wdata
);

  logic [BUS_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

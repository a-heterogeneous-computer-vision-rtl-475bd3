// micromemory -- the controller's writable control store: 32 kwords of
// 96-bit microinstructions.
//
// Programs are compiled straight to microcode (no instruction fetch or
// decode in the loop), downloaded by the host transputer through the write
// port, and read by the sequencer through a synchronous read port whose
// output register is the controller's microinstruction register.
//
// Timing: rdata is mem[raddr] one clock after raddr; write and read are
// independent ports.  From the design: 32 kword x 96 bit, loaded by the host.
// Own choice: the two-port organisation.  Contents are not reset.
module micromemory
  import apa_pkg::*;
#(
  parameter int unsigned DEPTH = UDEPTH,
  parameter int unsigned W     = UW
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output logic [W-1:0]              rdata,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  logic [W-1:0]              wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

// drn -- programmable data routing network between the data routing bus,
// the four GLiTCH chips and their RAMs.
//
// Each chip receives its 32-bit (16-digit) pattern from a register in this
// network.  Per microinstruction the registers are loaded, all at once, by
// one of the modes of apa_pkg::rop_e: broadcast of the bus to every chip,
// each chip's own RAM, or the read port of the neighbouring chip (the
// inter-chip path), with the bus or the far end of the array entering at
// the open end.  R_HOLD keeps the patterns.  In the other direction the
// chips' read ports are ORed onto the bus (bus_out): only the chip holding
// the array's first responder returns a field other than all 'x' (zero).
// Each chip's RAM sits on the chip's link and stores either the chip's read
// port (M_WR) or the pattern routed to the chip (M_WP).
//
// Timing: patterns are registered, so a route set up in one cycle is seen by
// the chips in the next.  From the design: 32-bit programmable paths from
// each chip's PBL to its neighbour and to the 32-bit bus.  Own choices: the
// mode list, the registered output and the wired-OR read-back.
module drn
  import apa_pkg::*;
#(
  parameter int unsigned NC = N_CHIPS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  rop_e                       op,
  input  mop_e                       ram_op,
  input  logic [BUS_W-1:0]           bus_in,
  output logic [BUS_W-1:0]           bus_out,
  input  logic [NC-1:0][BUS_W-1:0]   chip_rd,
  input  logic [NC-1:0][BUS_W-1:0]   ram_rd,
  output logic [NC-1:0][BUS_W-1:0]   ram_wd,
  output logic [NC-1:0][BUS_W-1:0]   chip_pat
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chip_pat <= '0;
    else begin
      for (int i = 0; i < int'(NC); i++) begin
        unique case (op)
          R_BCAST:  chip_pat[i] <= bus_in;
          R_RAM:    chip_pat[i] <= ram_rd[i];
          R_UP:     chip_pat[i] <= (i == 0) ? bus_in : chip_rd[i-1];
          R_DN:     chip_pat[i] <= (i == int'(NC)-1) ? bus_in : chip_rd[i+1];
          R_ROT_UP: chip_pat[i] <= chip_rd[(i + int'(NC) - 1) % int'(NC)];
          R_ROT_DN: chip_pat[i] <= chip_rd[(i + 1) % int'(NC)];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    bus_out = '0;
    for (int i = 0; i < int'(NC); i++) begin
      bus_out  |= chip_rd[i];
      ram_wd[i] = (ram_op == M_WP) ? chip_pat[i] : chip_rd[i];
    end
  end

endmodule

// data_store -- pattern store of the APA module, on the data routing bus and
// shared with the host transputer.
//
// A 4 kword x 32-bit memory (each word one 16-digit ternary pattern or a
// scalar) with two ports.  The controller port follows the microinstruction
// DS field: reads and writes at a direct address or through one of four
// address registers AR0..AR3 with post-increment or pre-decrement, which
// gives a stack for passing parameters to nested subroutines.  The host port
// lets the transputer load patterns and collect results at any time.
//
// Timing (controller port): op/ar/addr arrive in pipeline stage E0.  A read
// delivers rdata in the next cycle (E1), when the bus can take it.  A write
// computes its address in E0 and stores bus_in one cycle later (E1), when
// the same microinstruction's bus source drives the bus; D_LD_ARB also loads
// its register from the bus in E1.  Host port: data one cycle after h_en.  A
// same-address write from both ports in one cycle keeps the controller's.
//
// From the design: holds the patterns, interfaces to the host, address
// hold/increment/decrement logic for parameter passing.  Own choices: depth,
// number of address registers, the opcode set and the timing above.
module data_store
  import apa_pkg::*;
#(
  parameter int unsigned AW = DS_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dop_e              op,
  input  logic [1:0]        ar_sel,
  input  logic [AW-1:0]     addr,
  input  logic [BUS_W-1:0]  bus_in,
  output logic [BUS_W-1:0]  rdata,
  output logic [3:0][AW-1:0] ar,
  input  logic              h_en,
  input  logic              h_we,
  input  logic [AW-1:0]     h_addr,
  input  logic [BUS_W-1:0]  h_wdata,
  output logic [BUS_W-1:0]  h_rdata
);

  logic [BUS_W-1:0] mem [2**AW];
  logic [AW-1:0]    ea;         // effective address in E0
  logic             wr_e0, rd_e0;
  logic             wr_e1, ldb_e1;
  logic [AW-1:0]    wa_e1;
  logic [1:0]       ar_e1;

  always_comb begin
    ea    = addr;
    rd_e0 = 1'b0;
    wr_e0 = 1'b0;
    unique case (op)
      D_RD:     begin rd_e0 = 1'b1; end
      D_WR:     begin wr_e0 = 1'b1; end
      D_RD_AR,
      D_RD_INC: begin rd_e0 = 1'b1; ea = ar[ar_sel]; end
      D_WR_AR,
      D_WR_INC: begin wr_e0 = 1'b1; ea = ar[ar_sel]; end
      D_RD_DEC: begin rd_e0 = 1'b1; ea = ar[ar_sel] - 1'b1; end
      D_WR_DEC: begin wr_e0 = 1'b1; ea = ar[ar_sel] - 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar     <= '0;
      wr_e1  <= 1'b0;
      ldb_e1 <= 1'b0;
      wa_e1  <= '0;
      ar_e1  <= '0;
    end else begin
      wr_e1  <= wr_e0;
      ldb_e1 <= (op == D_LD_ARB);
      wa_e1  <= ea;
      ar_e1  <= ar_sel;
      unique case (op)
        D_RD_INC, D_WR_INC: ar[ar_sel] <= ar[ar_sel] + 1'b1;
        D_RD_DEC, D_WR_DEC: ar[ar_sel] <= ar[ar_sel] - 1'b1;
        D_LD_AR:            ar[ar_sel] <= addr;
        default: ;
      endcase
      if (ldb_e1) ar[ar_e1] <= bus_in[AW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_e0) rdata <= mem[ea];
    if (h_en) begin
      if (h_we) mem[h_addr] <= h_wdata;
      h_rdata <= mem[h_addr];
    end
    if (wr_e1) mem[wa_e1] <= bus_in;
  end

endmodule

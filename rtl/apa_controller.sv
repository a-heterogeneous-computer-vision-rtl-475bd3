// apa_controller -- the microprogrammed controller of the APA module: a
// Harvard VLIW machine built from the micromemory, the sequencer, the host
// interface and the per-unit pipeline registers.
//
// One 96-bit microinstruction issues per cycle.  It is not decoded here:
// each field goes to its functional unit, which decodes it locally.  So that
// a whole operation (for example "read a pattern from the data store, route
// it to the chips and match it") fits in one microinstruction, the fields
// are delayed to the cycle in which their unit acts:
//   E0 (issue cycle)  SEQ/CC, data store address and read, chip RAM read
//   E1 (+1 cycle)     bus source, data store write, SU/TR, routing network,
//                     chip RAM write
//   E2 (+2 cycles)    GLITCH operation, tag router mode
// Outputs e0/e1/e2 are the microinstruction as seen by each stage.  No
// hazard checking is done: a branch on a flag computed by a unit later in
// the pipeline sees the old flag, and the microcode generator must schedule
// for that (delayed branches).
//
// The microinstruction register is the micromemory's output register; while
// nothing issues (stopped, breakpoint) a NOP enters the pipeline.  The
// flags input is indexed by apa_pkg::cc_e; CC_HOST is supplied here.
//
// The host-side data store port passes straight through from host_if.
//
// From the design: Harvard VLIW organisation, decentralised decoding, 96-bit
// shared-field microword, one operation per microinstruction with extra
// pipeline registers, no hardware pipeline consistency check.  Own choices:
// the three stages and which unit sits in which.
module apa_controller
  import apa_pkg::*;
#(
  parameter int unsigned DEPTH = UDEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  // host transputer
  input  logic               h_en,
  input  logic               h_we,
  input  logic [18:0]        h_addr,
  input  logic [BUS_W-1:0]   h_wdata,
  output logic [BUS_W-1:0]   h_rdata,
  output logic               h_rvalid,
  output logic               attn,
  // data store host port
  output logic               ds_en,
  output logic               ds_we,
  output logic [DS_AW-1:0]   ds_addr,
  output logic [BUS_W-1:0]   ds_wdata,
  input  logic [BUS_W-1:0]   ds_rdata,
  // condition flags and CASE index
  input  logic [7:0]         flags_in,
  input  logic [3:0]         case_idx,
  // routing bus (for T_PUT) and host mailbox (bus source B_TR)
  input  logic [BUS_W-1:0]   bus_in,
  output logic [BUS_W-1:0]   mbox_in,
  // per-stage microinstructions
  output uinstr_t            e0,
  output uinstr_t            e1,
  output uinstr_t            e2,
  output logic [UAW-1:0]     pc,
  output logic               seq_err
);

  logic [UAW-1:0] uaddr, start, um_waddr;
  logic [UW-1:0]  ir_bits, um_wdata;
  uinstr_t        ir;
  logic           um_we, issue, load, halted, host_flag;
  logic [7:0]     flags;

  micromemory #(.DEPTH(DEPTH), .W(UW)) u_um (
    .clk, .raddr(uaddr[$clog2(DEPTH)-1:0]), .rdata(ir_bits),
    .we(um_we), .waddr(um_waddr[$clog2(DEPTH)-1:0]), .wdata(um_wdata)
  );

  assign ir = uinstr_t'(ir_bits);

  always_comb begin
    flags          = flags_in;
    flags[CC_HOST] = host_flag;
  end

  sequencer u_seq (
    .clk, .rst_n, .issue, .load, .start,
    .ir_op(ir.seq_op), .ir_addr(ir.seq_addr), .ir_cc(ir.cc), .ir_inv(ir.cc_inv),
    .flags, .case_idx, .uaddr, .pc, .halted, .err(seq_err)
  );

  host_if u_host (
    .clk, .rst_n, .h_en, .h_we, .h_addr, .h_wdata, .h_rdata, .h_rvalid, .attn,
    .um_we, .um_waddr, .um_wdata,
    .ds_en, .ds_we, .ds_addr, .ds_wdata, .ds_rdata,
    .pc, .halted, .seq_err, .issue, .load, .start, .host_flag,
    .attn_set(e1.sutr_sel && top_e'(e1.sutr_op) == T_ATTN),
    .put     (e1.sutr_sel && top_e'(e1.sutr_op) == T_PUT),
    .bus_in, .mbox_in
  );

  assign e0 = issue ? ir : UNOP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= UNOP;
      e2 <= UNOP;
    end else begin
      e1 <= e0;
      e2 <= e1;
    end
  end

endmodule

// apa_module -- the associative processor array (APA) module of the
// heterogeneous vision architecture: the SIMD image processing engine that
// sits under a transputer network.
//
// Four GLiTCH chips (64 1-bit PEs each, 256 PEs) hold image data in ternary
// CAM words and process it by broadcast pattern matching and writing.  The
// data routing network feeds each chip its 16-digit pattern from the 32-bit
// data routing bus, from its neighbour chip or from its own RAM.  The data
// store holds the patterns and is shared with the host transputer; the
// scalar unit shifts and tests scalar values; the tag router joins the
// chips' tag chains and reports whether any PE responded.  The controller
// issues one 96-bit microinstruction per cycle and delays each field to the
// pipeline stage of its unit (see apa_controller).
//
// Ports: the host transputer bus (h_*, attn) and the video stream from and
// to the frame store (vsr_shift, video_in, video_out).  The four chips'
// video shift registers are chained, chip 0 first, so a 256-pixel line
// shifted in at video_in ends with pixel p of the line in PE 255-p.
//
// The routing bus has one driver per cycle, chosen by the bus source field
// of the microinstruction in stage E1 (a multiplexer replaces the board's
// shared bus).  From the design: the unit list and their connections (bus,
// network, per-chip RAM and neighbour links, flags to the sequencer).  Own
// choices: the bus multiplexer, the video chaining order and all timing.
//
// Beside the module, with its own ports (emu_*), sits the clock pulse
// synchroniser of the GLiTCH chip emulators, the test rig that stands in for
// the four chips; it shares nothing with the rest but the reference clock.
module apa_module
  import apa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               h_en,
  input  logic               h_we,
  input  logic [18:0]        h_addr,
  input  logic [BUS_W-1:0]   h_wdata,
  output logic [BUS_W-1:0]   h_rdata,
  output logic               h_rvalid,
  output logic               attn,
  input  logic               vsr_shift,
  input  logic [PIX_W-1:0]   video_in,
  output logic [PIX_W-1:0]   video_out,
  // GLiTCH emulator clock synchroniser, a separate test system
  input  logic [N_CHIPS-1:0] emu_ready,
  output logic               emu_clk,
  output logic [31:0]        emu_cycles
);

  uinstr_t                        e0, e1, e2;
  logic [BUS_W-1:0]               bus, ds_q, su_s, mbox_in, drn_bus;
  logic                           ds_en, ds_we;
  logic [DS_AW-1:0]               ds_haddr;
  logic [BUS_W-1:0]               ds_hwdata, ds_hrdata;
  logic                           f_zero, f_neg, f_test, some_any;
  logic [7:0]                     flags;
  logic [N_CHIPS-1:0][BUS_W-1:0]  chip_pat, chip_rd, ram_rd, ram_wd;
  logic [N_CHIPS-1:0]             tag_first, tag_last, some;
  logic [N_CHIPS-1:0]             tag_up_in, tag_dn_in, lower_some;
  logic [N_CHIPS:0][PIX_W-1:0]    vchain;
  logic [UAW-1:0]                 pc;
  logic                           seq_err;

  // ------------------------------------------------------------ controller
  always_comb begin
    flags             = '0;
    flags[CC_SU_ZERO] = f_zero;
    flags[CC_SU_NEG]  = f_neg;
    flags[CC_SU_TEST] = f_test;
    flags[CC_SOME]    = some_any;
  end

  apa_controller u_ctl (
    .clk, .rst_n, .h_en, .h_we, .h_addr, .h_wdata, .h_rdata, .h_rvalid, .attn,
    .ds_en, .ds_we, .ds_addr(ds_haddr), .ds_wdata(ds_hwdata), .ds_rdata(ds_hrdata),
    .flags_in(flags), .case_idx(su_s[3:0]), .bus_in(bus), .mbox_in,
    .e0, .e1, .e2, .pc, .seq_err
  );

  // ------------------------------------------------------ data routing bus
  always_comb begin
    unique case (e1.bus_src)
      B_DS:    bus = ds_q;
      B_SU:    bus = su_s;
      B_TR:    bus = mbox_in;
      B_DRN:   bus = drn_bus;
      default: bus = '0;
    endcase
  end

  data_store u_ds (
    .clk, .rst_n, .op(e0.ds_op), .ar_sel(e0.ds_ar), .addr(e0.ds_addr),
    .bus_in(bus), .rdata(ds_q), .ar(),
    .h_en(ds_en), .h_we(ds_we), .h_addr(ds_haddr), .h_wdata(ds_hwdata),
    .h_rdata(ds_hrdata)
  );

  scalar_unit u_su (
    .clk, .rst_n,
    .op(e1.sutr_sel ? U_NOP : uop_e'(e1.sutr_op)), .arg(e1.sutr_arg),
    .bus_in(bus), .s(su_s), .f_zero, .f_neg, .f_test
  );

  // ------------------------------------------------ routing network, array
  drn u_drn (
    .clk, .rst_n, .op(e1.drn_op), .ram_op(e1.ram_op), .bus_in(bus),
    .bus_out(drn_bus), .chip_rd, .ram_rd, .ram_wd, .chip_pat
  );

  tag_router u_tr (
    .rot(e2.tr_rot), .tag_first, .tag_last, .some,
    .tag_up_in, .tag_dn_in, .lower_some, .some_any
  );

  assign vchain[0] = video_in;
  assign video_out = vchain[N_CHIPS];

  for (genvar c = 0; c < int'(N_CHIPS); c++) begin : g_chip
    pword_t rd;

    chip_ram u_ram (
      .clk,
      .re(e0.ram_op == M_RD), .raddr(e0.ram_addr), .rdata(ram_rd[c]),
      .we(e1.ram_op == M_WR || e1.ram_op == M_WP), .waddr(e1.ram_addr), .wdata(ram_wd[c])
    );

    glitch_chip u_chip (
      .clk, .rst_n, .op(e2.g_op), .off(e2.g_off), .sub(sword_t'(e2.g_sub)),
      .pin_in(pword_t'(chip_pat[c])), .pin_rd(rd),
      .tag_up_in(tag_up_in[c]), .tag_dn_in(tag_dn_in[c]),
      .lower_some(lower_some[c]),
      .tag_first(tag_first[c]), .tag_last(tag_last[c]), .some(some[c]),
      .vsr_shift, .vin(vchain[c]), .vout(vchain[c+1])
    );

    assign chip_rd[c] = BUS_W'(rd);
  end

  // ------------------------------------------------ emulator clock (beside)
  emu_clock_sync #(.N_EMU(N_CHIPS)) u_emu (
    .clk, .rst_n, .ready(emu_ready), .emu_clk, .cycles(emu_cycles)
  );

endmodule

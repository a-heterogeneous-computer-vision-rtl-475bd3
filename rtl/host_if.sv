// host_if -- the APA controller's interface to the host transputer.
//
// The transputer sees a word-addressed register space (h_addr, 19 bits):
//   h_addr[18:17] = 0  micromemory download: word h_addr[16:2], part
//                      h_addr[1:0]; parts 0 and 1 (bits 31:0, 63:32) are
//                      staged, writing part 2 (bits 95:64) writes the word.
//   h_addr[18:17] = 1  data store, word h_addr[11:0] (read and write).
//   h_addr[18:17] = 2  control registers, h_addr[2:0]:
//       0 CTRL     bit0 run, bit1 step (one instruction, self-clearing),
//                  bit2 breakpoint enable, bit3 host flag (condition CC_HOST)
//       1 START    write: set the microprogram pointer to the value
//       2 BREAK    breakpoint address
//       3 STATUS   read: {err, attn, halted, run} in bits 19:16, pc in 14:0
//       4 ATTN     write: clear the attention request
//       5 MBOX_IN  word the microprogram can put on the bus (source B_TR)
//       6 MBOX_OUT read: last word the microprogram sent (T_PUT)
// Reads return h_rdata one clock after h_en with h_we low, flagged by
// h_rvalid.
//
// Run control: issue is high in every cycle in which the controller may
// issue a microinstruction: while run is set, or for one cycle after a step
// command.  A HALT clears run.  With the breakpoint enabled, run clears
// before the instruction at the breakpoint address issues (test mode); the
// first instruction after setting run is never stopped, so a run from the
// breakpoint proceeds.  The microprogram raises attn with T_ATTN (the
// controller asking for the host's attention).
//
// The data store port, the micromemory address and top word part, and the
// START value are wired straight from the host bus; only the decode and the
// staged parts are logic here.
//
// From the design: download of microprograms, setting the microprogram
// pointer, data store access by the host, attention requests, single-step
// and breakpoints for testing.  Own choices: the register map, the staged
// 96-bit download and the breakpoint rule.  Not built: the transputer's
// request for the data routing bus.
module host_if
  import apa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // transputer side
  input  logic               h_en,
  input  logic               h_we,
  input  logic [18:0]        h_addr,
  input  logic [BUS_W-1:0]   h_wdata,
  output logic [BUS_W-1:0]   h_rdata,
  output logic               h_rvalid,
  output logic               attn,
  // micromemory write port
  output logic               um_we,
  output logic [UAW-1:0]     um_waddr,
  output logic [UW-1:0]      um_wdata,
  // data store host port
  output logic               ds_en,
  output logic               ds_we,
  output logic [DS_AW-1:0]   ds_addr,
  output logic [BUS_W-1:0]   ds_wdata,
  input  logic [BUS_W-1:0]   ds_rdata,
  // sequencer
  input  logic [UAW-1:0]     pc,
  input  logic               halted,
  input  logic               seq_err,
  output logic               issue,
  output logic               load,
  output logic [UAW-1:0]     start,
  output logic               host_flag,
  // transputer field of the microinstruction (stage E1)
  input  logic               attn_set,
  input  logic               put,
  input  logic [BUS_W-1:0]   bus_in,
  output logic [BUS_W-1:0]   mbox_in
);

  logic [1:0]        region;
  logic [2:0]        reg_a;
  logic              run, step, bp_en, resume, halted_st;
  logic [UAW-1:0]    bp;
  logic [BUS_W-1:0]  stage0, stage1, mbox_out, ctl_rd;
  logic [1:0]        rd_region;
  logic              bp_stop;

  assign region = h_addr[18:17];
  assign reg_a  = h_addr[2:0];

  assign bp_stop = run && bp_en && !resume && (pc == bp);
  assign issue   = (run && !bp_stop) || step;

  assign um_we    = h_en && h_we && region == 2'd0 && h_addr[1:0] == 2'd2;
  assign um_waddr = h_addr[16:2];
  assign um_wdata = {h_wdata, stage1, stage0};

  assign ds_en    = h_en && region == 2'd1;
  assign ds_we    = h_we;
  assign ds_addr  = h_addr[DS_AW-1:0];
  assign ds_wdata = h_wdata;

  assign load  = h_en && h_we && region == 2'd2 && reg_a == 3'd1;
  assign start = h_wdata[UAW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      step      <= 1'b0;
      bp_en     <= 1'b0;
      resume    <= 1'b0;
      host_flag <= 1'b0;
      halted_st <= 1'b0;
      bp        <= '0;
      attn      <= 1'b0;
      stage0    <= '0;
      stage1    <= '0;
      mbox_in   <= '0;
      mbox_out  <= '0;
      ctl_rd    <= '0;
      rd_region <= '0;
      h_rvalid  <= 1'b0;
    end else begin
      step     <= 1'b0;
      h_rvalid <= h_en && !h_we;
      if (issue) resume <= 1'b0;
      if (bp_stop) run <= 1'b0;
      if (halted) begin
        run       <= 1'b0;
        halted_st <= 1'b1;
      end
      if (attn_set) attn <= 1'b1;
      if (put)      mbox_out <= bus_in;

      if (h_en && h_we) begin
        unique case (region)
          2'd0: begin
            if (h_addr[1:0] == 2'd0) stage0 <= h_wdata;
            if (h_addr[1:0] == 2'd1) stage1 <= h_wdata;
          end
          2'd2: begin
            unique case (reg_a)
              3'd0: begin
                run       <= h_wdata[0];
                step      <= h_wdata[1];
                bp_en     <= h_wdata[2];
                host_flag <= h_wdata[3];
                resume    <= h_wdata[0] | h_wdata[1];
                if (h_wdata[0] | h_wdata[1]) halted_st <= 1'b0;
              end
              3'd2: bp      <= h_wdata[UAW-1:0];
              3'd4: attn    <= 1'b0;
              3'd5: mbox_in <= h_wdata;
              default: ;
            endcase
          end
          default: ;
        endcase
      end

      if (h_en && !h_we) begin
        rd_region <= region;
        unique case (reg_a)
          3'd0: ctl_rd <= BUS_W'({host_flag, bp_en, 1'b0, run});
          3'd2: ctl_rd <= BUS_W'(bp);
          3'd3: ctl_rd <= BUS_W'({seq_err, attn, halted_st, run, 1'b0, pc});
          3'd5: ctl_rd <= mbox_in;
          3'd6: ctl_rd <= mbox_out;
          default: ctl_rd <= '0;
        endcase
      end
    end
  end

  assign h_rdata = (rd_region == 2'd1) ? ds_rdata : ctl_rd;

endmodule

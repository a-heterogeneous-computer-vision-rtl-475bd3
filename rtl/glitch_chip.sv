// glitch_chip -- the GLiTCH associative processor array chip: 64 1-bit PEs
// with their ternary CAM words, the pattern broadcast logic (PBL) and the
// 64x8 video shift register (VSR).
//
// Every cycle the chip executes one GLiTCH operation (op) on all PEs at
// once.  The 16-digit pin pattern is aligned by the PBL at digit offset off
// into a 64-digit pattern; sub is the 4-digit subset pattern.  The PEs form
// a 1-D chain: PE i-1 / i+1 tags feed the shift operations, with the chip
// edges connected through tag_up_in (tag of the previous chip's last PE) and
// tag_dn_in (tag of the next chip's first PE).  G_FIRST keeps only the first
// tagged PE of the whole array; lower_some says a chip before this one
// already has a tagged PE.  G_READ latches the 16-digit field at off of the
// first tagged PE into pin_rd (all 'x' when none is tagged), which the data
// routing network reads.  G_VSR_XFER swaps, in every PE, the 8 CAM digits at
// off .. off+7 (bit b at digit off+b, written as cared digits) with that PE's
// VSR byte ('x' digits read as 0).
//
// Timing: all operations take effect at the next clock edge; pin_rd is
// registered.  some, tag_first and tag_last are registered state.
// From the design: 64 PEs, PBL, VSR, 1-D connectivity, tag-conditional
// operation inside the chip.  Own choices: the operation set, the read port
// and the exchange used to move pixels between the VSR and the CAM.
module glitch_chip
  import apa_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  gop_e                   op,
  input  logic [OFF_W-1:0]       off,
  input  sword_t                 sub,
  input  pword_t                 pin_in,
  output pword_t                 pin_rd,
  input  logic                   tag_up_in,
  input  logic                   tag_dn_in,
  input  logic                   lower_some,
  output logic                   tag_first,
  output logic                   tag_last,
  output logic                   some,
  input  logic                   vsr_shift,
  input  logic [PIX_W-1:0]       vin,
  output logic [PIX_W-1:0]       vout
);

  dword_t                       pat_d;
  dword_t                       word   [N_PE];
  dword_t                       wr_d   [N_PE];
  logic   [N_PE-1:0]            tag;
  logic   [N_PE-1:0]            first_ok;
  logic   [N_PE-1:0][PIX_W-1:0] vsr_q, vsr_ld;
  pword_t                       fields [N_PE];
  pword_t                       rd_sel;
  logic                         xfer;

  assign xfer = (op == G_VSR_XFER);

  pbl u_pbl_in (
    .pin_pat (pin_in), .off(off), .cam_pat(pat_d),
    .cam_word('0), .pin_out()
  );

  for (genvar i = 0; i < int'(N_PE); i++) begin : g_pe
    logic tprev, tnext;
    if (i == 0) begin : g_lo
      assign tprev = tag_up_in;
    end else begin : g_mid_lo
      assign tprev = tag[i-1];
    end
    if (i == int'(N_PE) - 1) begin : g_hi
      assign tnext = tag_dn_in;
    end else begin : g_mid_hi
      assign tnext = tag[i+1];
    end

    pbl u_pbl_rd (
      .pin_pat('0), .off(off), .cam_pat(),
      .cam_word(word[i]), .pin_out(fields[i])
    );

    // VSR byte <-> CAM digits off .. off+7
    always_comb begin
      wr_d[i] = '0;
      for (int b = 0; b < int'(PIX_W); b++) begin
        wr_d[i][(int'(off) + b) % int'(DATA_DIGITS)] = {1'b1, vsr_q[i][b]};
        vsr_ld[i][b] = word[i][(int'(off) + b) % int'(DATA_DIGITS)] == T_1;
      end
    end

    glitch_pe u_pe (
      .clk, .rst_n, .op, .pat_d, .pat_s(sub),
      .tag_prev(tprev), .tag_next(tnext), .first_ok(first_ok[i]),
      .xfer, .wr_d(wr_d[i]),
      .word(word[i]), .sub(), .tag(tag[i]), .r()
    );
  end

  // first-responder resolution and read multiplexer
  always_comb begin
    logic seen;
    seen   = lower_some;
    rd_sel = '0;
    for (int i = 0; i < int'(N_PE); i++) begin
      first_ok[i] = !seen;
      if (tag[i] && !seen) rd_sel = fields[i];
      seen = seen | tag[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             pin_rd <= '0;
    else if (op == G_READ)  pin_rd <= rd_sel;
  end

  assign some      = |tag;
  assign tag_first = tag[0];
  assign tag_last  = tag[N_PE-1];

  vsr #(.DEPTH(N_PE)) u_vsr (
    .clk, .rst_n, .shift(vsr_shift), .vin, .vout,
    .ld(xfer), .ld_data(vsr_ld), .q(vsr_q)
  );

endmodule

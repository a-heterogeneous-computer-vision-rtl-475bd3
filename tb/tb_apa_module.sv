// tb_apa_module -- end-to-end test of the whole APA module at its full size
// (4 chips x 64 PEs, 32 kword micromemory), driven only through the host
// port and the video ports.
//
// The host loads patterns into the data store and a microprogram into the
// micromemory, streams a 256-pixel line into the chained video shift
// registers, sets a breakpoint, starts the program, and raises the host flag
// the program waits on.  The microprogram:
//   * moves the pixels from the VSRs into the CAMs;
//   * in a nested subroutine, marks every pixel >= 128 (threshold pattern
//     taken from the host mailbox) in CAM digit 8;
//   * parks the pattern "pixel = 77" in every chip RAM;
//   * lists the bright PEs: a DO WHILE loop on the responder flag picks the
//     first responder, reads its 16-digit field through the routing network
//     and pushes it into the data store with a post-incremented address
//     register, then removes it from the responder set;
//   * stops at the host's breakpoint, is single-stepped, and resumes;
//   * in a subroutine with a counted loop, shifts the bright tags three PEs
//     up round the ring and marks them in digit 9;
//   * matches the parked pattern from the chip RAMs and marks pixel = 77 in
//     digit 10;
//   * loads, shifts and tests a scalar and takes a CASE branch on it;
//   * exchanges CAM digits 8..15 back into the VSRs, reports the scalar and
//     the mailbox through the bus, raises attention and halts.
// The host then streams the result line out (while a new line streams in)
// and checks every pixel, the list in the data store and the mailboxes
// against values computed here from the input pixels.  Each mechanism is
// counted from the controller's pipeline outputs; one never seen fails.
// One microinstruction must issue per clock while running.
module tb_apa_module;
  import apa_pkg::*;

  logic clk = 0, rst_n = 0;
  logic h_en, h_we, h_rvalid, attn, vsr_shift;
  logic [18:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  logic [7:0] video_in, video_out;
  logic [3:0] emu_ready = '0;
  logic emu_clk;
  logic [31:0] emu_cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  apa_module dut (.*);

  localparam int CTL = 2 << 17, DS = 1 << 17;

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic hw(int a, logic [31:0] d);
    h_en = 1; h_we = 1; h_addr = 19'(a); h_wdata = d; @(posedge clk); #1 h_en = 0; h_we = 0;
  endtask
  task automatic hr(int a, output logic [31:0] d);
    h_en = 1; h_we = 0; h_addr = 19'(a); @(posedge clk); #1 h_en = 0; d = h_rdata;
  endtask
  task automatic load_u(int a, uinstr_t u);
    logic [95:0] b;
    b = u;
    hw((a << 2) | 0, b[31:0]);
    hw((a << 2) | 1, b[63:32]);
    hw((a << 2) | 2, b[95:64]);
  endtask

  // ------------------------------------------------------- microassembler
  function automatic uinstr_t SEQ(uinstr_t u, sop_e op, int a = 0, cc_e cc = CC_ALWAYS, bit inv = 0);
    u.seq_op = op; u.seq_addr = 15'(a); u.cc = cc; u.cc_inv = inv; return u;
  endfunction
  function automatic uinstr_t DSF(uinstr_t u, dop_e op, int a = 0, int ar = 0);
    u.ds_op = op; u.ds_addr = 12'(a); u.ds_ar = 2'(ar); return u;
  endfunction
  function automatic uinstr_t SU(uinstr_t u, uop_e op, int n = 0);
    u.sutr_sel = 0; u.sutr_op = op; u.sutr_arg = 5'(n); return u;
  endfunction
  function automatic uinstr_t TR(uinstr_t u, top_e op);
    u.sutr_sel = 1; u.sutr_op = op; return u;
  endfunction
  function automatic uinstr_t BUS(uinstr_t u, bsrc_e s, rop_e r = R_HOLD);
    u.bus_src = s; u.drn_op = r; return u;
  endfunction
  function automatic uinstr_t RAM(uinstr_t u, mop_e op, int a, rop_e r = R_HOLD);
    u.ram_op = op; u.ram_addr = 10'(a); if (r != R_HOLD) u.drn_op = r; return u;
  endfunction
  function automatic uinstr_t G(uinstr_t u, gop_e op, int off = 0, bit rot = 0);
    u.g_op = op; u.g_off = 6'(off); u.tr_rot = rot; return u;
  endfunction

  // patterns (16 pin digits, {care,value} per digit, digit 0 in bits 1:0)
  function automatic logic [31:0] bytepat(byte unsigned v);
    logic [31:0] p = '0;
    for (int b = 0; b < 8; b++) p[2*b +: 2] = {1'b1, v[b]};
    return p;
  endfunction
  function automatic logic [31:0] dpat(int d, bit v);
    logic [31:0] p = '0;
    p[2*d +: 2] = {1'b1, v};
    return p;
  endfunction

  // ---------------------------------------------------- mechanism counters
  int n_g[gop_e], n_s[sop_e], n_d[dop_e], n_r[rop_e], n_m[mop_e], n_b[bsrc_e];
  int n_su[int], n_tr[int], n_rot, n_taken, n_bp, n_step, n_stall, n_run, n_issue;
  bit running;
  always @(posedge clk) if (rst_n) begin
    uinstr_t e0, e1, e2;
    e0 = dut.u_ctl.e0; e1 = dut.u_ctl.e1; e2 = dut.u_ctl.e2;
    if (dut.u_ctl.issue) begin
      n_issue++;
      n_s[e0.seq_op]++;
      if (e0.seq_op inside {S_JUMP, S_CALL, S_RET} && dut.u_ctl.u_seq.cond) n_taken++;
    end
    if (dut.u_ctl.u_host.bp_stop) n_bp++;
    if (dut.u_ctl.u_host.step) n_step++;
    if (running) begin n_run++; if (!dut.u_ctl.issue) n_stall++; end
    n_d[e0.ds_op]++;
    n_b[e1.bus_src]++;
    n_r[e1.drn_op]++;
    n_m[e1.ram_op]++;
    if (!e1.sutr_sel) n_su[e1.sutr_op]++; else n_tr[e1.sutr_op]++;
    n_g[e2.g_op]++;
    if (e2.g_op == G_SHIFT_UP && e2.tr_rot) n_rot++;
  end

  // -------------------------------------------------------------- model
  byte unsigned line[256], px[256];
  bit bright[256], eq77[256];

  initial begin
    logic [31:0] d;
    uinstr_t N;
    int nb, k, issued0, cyc0;
    h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0; vsr_shift = 0; video_in = 0;
    running = 0;
    N = UNOP;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // data store: patterns and a cleared result area
    hw(DS | 0, bytepat(77));
    hw(DS | 2, dpat(0, 1));  hw(DS | 3, dpat(0, 0));
    hw(DS | 4, 32'd1);
    hw(DS | 5, dpat(2, 0));  hw(DS | 6, dpat(2, 1));
    hw(DS | 8, dpat(1, 0));  hw(DS | 9, dpat(1, 1));
    hw(DS | 7, 32'h0);
    for (int a = 'h100; a < 'h200; a++) hw(DS | a, 32'h0);
    hw(CTL | 5, dpat(7, 1));                     // mailbox: threshold pattern

    // microprogram
    load_u(0,  SEQ(N, S_WAIT, 0, CC_HOST));
    load_u(1,  G(DSF(N, D_LD_AR, 'h100, 0), G_VSR_XFER, 0));
    load_u(2,  SEQ(N, S_CALL, 40));
    load_u(3,  BUS(DSF(N, D_RD, 0), B_DS, R_BCAST));
    load_u(4,  RAM(N, M_WP, 3));
    load_u(5,  G(BUS(DSF(N, D_RD, 2), B_DS, R_BCAST), G_MATCH, 8));
    load_u(6,  G(N, G_R_LD));
    load_u(7,  N);
    load_u(8,  SEQ(N, S_JUMP, 14, CC_SOME, 1));  // DO WHILE some responder
    load_u(9,  G(N, G_FIRST));
    load_u(10, G(N, G_READ, 0));
    load_u(11, G(N, G_TAG_XOR_R));
    load_u(12, G(BUS(DSF(N, D_WR_INC, 0, 0), B_DRN), G_R_LD));
    load_u(13, SEQ(N, S_JUMP, 8));
    load_u(14, SEQ(N, S_CALL, 50));
    load_u(15, G(RAM(N, M_RD, 3, R_RAM), G_MATCH, 0));
    load_u(16, G(BUS(DSF(N, D_RD, 5), B_DS, R_BCAST), G_WRITE_ALL, 8));
    load_u(17, G(BUS(DSF(N, D_RD, 6), B_DS, R_BCAST), G_WRITE, 8));
    load_u(18, SU(BUS(DSF(N, D_RD, 4), B_DS), U_LOAD));
    load_u(19, SU(N, U_SHL, 1));
    load_u(20, SU(N, U_TEST, 1));
    load_u(21, N);
    load_u(22, SEQ(N, S_JUMP, 60, CC_SU_TEST, 1));
    load_u(23, SEQ(N, S_CASE, 30));
    load_u(30, SEQ(N, S_JUMP, 60));
    load_u(31, SEQ(N, S_JUMP, 60));
    load_u(32, SEQ(N, S_JUMP, 34));
    load_u(33, SEQ(N, S_JUMP, 60));
    load_u(34, G(N, G_VSR_XFER, 8));
    load_u(35, TR(BUS(N, B_SU), T_PUT));
    load_u(36, BUS(DSF(N, D_WR, 7), B_TR));
    load_u(37, TR(N, T_ATTN));
    load_u(38, SEQ(N, S_HALT));
    // threshold subroutine, calls the marking subroutine
    load_u(40, G(BUS(N, B_TR, R_BCAST), G_MATCH, 0));
    load_u(41, SEQ(N, S_CALL, 45));
    load_u(42, SEQ(N, S_RET));
    load_u(45, G(BUS(DSF(N, D_RD, 3), B_DS, R_BCAST), G_WRITE_ALL, 8));
    load_u(46, G(BUS(DSF(N, D_RD, 2), B_DS, R_BCAST), G_WRITE, 8));
    load_u(47, SEQ(N, S_RET));
    // shifted-mark subroutine with a counted loop
    load_u(50, G(BUS(DSF(N, D_RD, 2), B_DS, R_BCAST), G_MATCH, 8));
    load_u(51, G(BUS(DSF(N, D_RD, 8), B_DS, R_BCAST), G_WRITE_ALL, 8));
    load_u(52, SEQ(N, S_LOOP, 2));
    load_u(53, G(N, G_SHIFT_UP, 0, 1));
    load_u(54, SEQ(N, S_ENDLOOP));
    load_u(55, G(BUS(DSF(N, D_RD, 9), B_DS, R_BCAST), G_WRITE, 8));
    load_u(56, SEQ(N, S_RET));
    load_u(60, TR(SEQ(N, S_HALT), T_ATTN));

    // video line in; PE j receives line[255-j]
    for (int n = 0; n < 256; n++) begin
      line[n] = (n % 7 == 3) ? 8'd77 : 8'($urandom());
      video_in = line[n]; vsr_shift = 1; @(posedge clk); #1;
    end
    vsr_shift = 0;
    for (int j = 0; j < 256; j++) begin
      px[j] = line[255 - j]; bright[j] = px[j] >= 128; eq77[j] = px[j] == 77;
    end

    // start at 0 with a breakpoint at 14, then release the WAIT
    hw(CTL | 1, 0);
    hw(CTL | 2, 14);
    hw(CTL | 0, 32'h5);
    repeat (5) @(posedge clk); #1;
    hr(CTL | 3, d); chk(d[14:0] == 0 && d[16], "waiting at 0 for the host flag");
    hw(CTL | 0, 32'hD);                           // keep running, set host flag
    begin int t = 0; do begin hr(CTL | 3, d); t++; end while (d[16] && t < 5000); end
    chk(d[14:0] == 14 && !d[16], "stopped at breakpoint 14");
    // the bright list must be complete at the breakpoint
    nb = 0; for (int j = 0; j < 256; j++) if (bright[j]) nb++;
    k = 0;
    for (int j = 0; j < 256; j++) if (bright[j]) begin
      hr(DS | ('h100 + k), d);
      chk(d == (bytepat(px[j]) | dpat(8, 1)), $sformatf("list entry %0d (PE %0d) %h", k, j, d));
      k++;
    end
    hr(DS | ('h100 + nb), d); chk(d == 0, "list ends after the last bright PE");
    // single step: the CALL at 14 issues and the pointer moves to 50
    hw(CTL | 0, 32'hE);
    repeat (3) @(posedge clk); #1;
    hr(CTL | 3, d); chk(d[14:0] == 50 && !d[16], "single step into subroutine");
    // resume to the end; one microinstruction per clock
    issued0 = n_issue; cyc0 = 0;
    hw(CTL | 0, 32'hD);
    running = 1;
    while (!attn && cyc0 < 10000) begin @(posedge clk); #1; cyc0++; end
    running = 0;
    chk(attn, "attention raised");
    repeat (3) @(posedge clk); #1;
    hr(CTL | 3, d);
    chk(d[14:0] == 38 && d[17] && !d[19], $sformatf("halted at 38 (status %h)", d));
    chk(n_stall == 0, $sformatf("issued every cycle while running (%0d stalls)", n_stall));
    hr(CTL | 6, d); chk(d == 32'd2, "scalar result in the host mailbox");
    hr(DS | 7, d);  chk(d == dpat(7, 1), "host mailbox word stored via the bus");
    hw(CTL | 4, 0); chk(!attn, "attention acknowledged");

    // stream the result line out while a new line streams in
    for (int n = 0; n < 256; n++) begin
      int j;
      byte unsigned e;
      j = 255 - n;
      e = {5'b0, eq77[j], bright[(j + 253) % 256], bright[j]};
      chk(video_out == e, $sformatf("result pixel of PE %0d: %h exp %h", j, video_out, e));
      video_in = 8'($urandom()); vsr_shift = 1; @(posedge clk); #1;
    end
    vsr_shift = 0;

    // emulator clock: four rounds, the pulse waits for the slowest emulator
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 4; i++) begin
        repeat ($urandom_range(3)) @(posedge clk); #1;
        chk(!emu_clk, "no emulator pulse before all have reported");
        emu_ready[i] = ~emu_ready[i];
      end
      @(posedge clk); #1;
      chk(emu_clk, "emulator pulse after the slowest");
      repeat (3) @(posedge clk); #1;
    end
    chk(emu_cycles == 4, "four emulated clock cycles");

    // every mechanism must have happened
    begin
      string names[$];
      int    cnts[$];
      names = '{"vsr exchange", "match", "write tagged", "write all", "first responder",
                "read-out", "tag shift (ring)", "R load", "tag xor R", "call", "return",
                "loop", "end loop", "case", "wait", "halt", "branch taken", "ds load AR",
                "ds write AR++", "ds read", "ds write", "bus from DS", "bus from SU",
                "bus from TR", "bus from DRN", "drn broadcast", "drn from RAM",
                "ram write pattern", "ram read", "su load", "su shift", "su test",
                "tr put", "tr attention", "breakpoint", "single step", "emulator pulse"};
      cnts  = '{n_g[G_VSR_XFER], n_g[G_MATCH], n_g[G_WRITE], n_g[G_WRITE_ALL], n_g[G_FIRST],
                n_g[G_READ], n_rot, n_g[G_R_LD], n_g[G_TAG_XOR_R], n_s[S_CALL], n_s[S_RET],
                n_s[S_LOOP], n_s[S_ENDLOOP], n_s[S_CASE], n_s[S_WAIT], n_s[S_HALT], n_taken,
                n_d[D_LD_AR], n_d[D_WR_INC], n_d[D_RD], n_d[D_WR], n_b[B_DS], n_b[B_SU],
                n_b[B_TR], n_b[B_DRN], n_r[R_BCAST], n_r[R_RAM], n_m[M_WP], n_m[M_RD],
                n_su[U_LOAD], n_su[U_SHL], n_su[U_TEST], n_tr[T_PUT], n_tr[T_ATTN], n_bp, n_step, int'(emu_cycles)};
      foreach (names[i]) begin
        $display("  %-18s %0d", names[i], cnts[i]);
        chk(cnts[i] > 0, {"mechanism never happened: ", names[i]});
      end
      chk(n_g[G_FIRST] == nb, "one first-responder pass per bright pixel");
      chk(n_rot == 3, "three ring shifts from the counted loop");
    end
    $display("bright pixels %0d, cycles from resume to attention %0d", nb, cyc0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

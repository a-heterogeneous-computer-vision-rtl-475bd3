// tb_glitch_chip -- self-checking test of one GLiTCH chip.  Pixels are
// shifted into the VSR and exchanged into the CAMs; then value and threshold
// searches, first-responder selection, read-out, tag shifts across the chip
// edges, tag-conditional writes, subset CAM matching and the exchange back to
// the VSR are each checked against values the testbench computes from the
// pixels it sent.
module tb_glitch_chip;
  import apa_pkg::*;
  logic clk = 0, rst_n = 0;
  gop_e op;
  logic [OFF_W-1:0] off;
  sword_t sub;
  pword_t pin_in, pin_rd;
  logic tag_up_in, tag_dn_in, lower_some, tag_first, tag_last, some;
  logic vsr_shift;
  logic [PIX_W-1:0] vin, vout;
  int checks = 0, failures = 0;
  byte unsigned pix[N_PE];          // pixel held by PE i
  logic [N_PE-1:0] et;              // expected tags

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  glitch_chip dut (.*);

  task automatic do_op(gop_e o);
    op = o; @(posedge clk); #1 op = G_NOP;
  endtask

  task automatic check_tags(string what);
    logic [N_PE-1:0] t;
    t = dut.tag;
    checks++;
    if (t !== et) begin failures++; $display("%s: tags %h exp %h", what, t, et); end
    checks++;
    if (some !== (et != 0) || tag_first !== et[0] || tag_last !== et[N_PE-1]) begin
      failures++; $display("%s: edge/some flags", what);
    end
  endtask

  function automatic pword_t byte_pat(byte unsigned v);
    pword_t p = '0;
    for (int b = 0; b < 8; b++) p[b] = {1'b1, v[b]};
    return p;
  endfunction

  initial begin
    op = G_NOP; off = 0; sub = '0; pin_in = '0; tag_up_in = 0; tag_dn_in = 0;
    lower_some = 0; vsr_shift = 0; vin = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // stream 64 pixels in; PE i ends with the pixel sent (63-i)th
    for (int n = 0; n < N_PE; n++) begin
      vin = (n % 5 == 0) ? 8'd77 : 8'($urandom());
      pix[N_PE-1-n] = vin;
      vsr_shift = 1; @(posedge clk); #1;
    end
    vsr_shift = 0;
    do_op(G_VSR_XFER);
    // the VSR now holds the old CAM digits (all 'x', read as 0)
    for (int n = 0; n < N_PE; n++) begin
      checks++; if (vout !== 0) begin failures++; $display("vsr not cleared by exchange"); end
      vsr_shift = 1; vin = 0; @(posedge clk); #1;
    end
    vsr_shift = 0;
    // equality search for 77
    pin_in = byte_pat(77); do_op(G_MATCH);
    foreach (pix[i]) et[i] = (pix[i] == 77);
    check_tags("match 77");
    // threshold: pixel >= 128 (digit 7 = 1)
    pin_in = '0; pin_in[7] = T_1; do_op(G_MATCH_OR);
    foreach (pix[i]) et[i] = et[i] | pix[i][7];
    check_tags("or msb");
    // read-out with several responders returns the first; then keep only it
    begin int f; f = -1; for (int i = 0; i < N_PE; i++) if (et[i] && f < 0) f = i;
      do_op(G_READ);
      checks++;
      if (pin_rd !== byte_pat(pix[f])) begin failures++; $display("read of several %h exp %h", pin_rd, byte_pat(pix[f])); end
      do_op(G_FIRST);
      et = '0; if (f >= 0) et[f] = 1;
      check_tags("first");
      do_op(G_READ);
      checks++;
      if (pin_rd !== byte_pat(pix[f])) begin failures++; $display("read %h exp %h", pin_rd, byte_pat(pix[f])); end
    end
    // shifts across the chip edges
    do_op(G_SET_ALL); et = '1; check_tags("set");
    pin_in = byte_pat(77); do_op(G_MATCH); foreach (pix[i]) et[i] = (pix[i] == 77);
    tag_up_in = 1; do_op(G_SHIFT_UP); et = {et[N_PE-2:0], 1'b1}; check_tags("shift up");
    tag_dn_in = 0; do_op(G_SHIFT_DN); et = {1'b0, et[N_PE-1:1]}; check_tags("shift dn");
    tag_up_in = 0;
    // tag-conditional write of digit 20, then search it
    // (digit 20 is first set to 0 everywhere: a stored 'x' would match anything)
    pin_in = '0; pin_in[4] = T_0; off = 16; do_op(G_WRITE_ALL);
    pin_in = '0; pin_in[4] = T_1; do_op(G_WRITE);
    begin logic [N_PE-1:0] w; w = et;
      pin_in = '0; pin_in[4] = T_1; do_op(G_MATCH); et = w; check_tags("conditional write");
    end
    off = 0;
    // R register: R <= tag, NOT, XOR with R gives all ones
    do_op(G_R_LD); do_op(G_NOT); et = ~et; check_tags("not");
    do_op(G_TAG_XOR_R); et = '1; check_tags("xor r");
    // a responder in a lower chip clears FIRST everywhere
    lower_some = 1; do_op(G_FIRST); et = '0; check_tags("lower some"); lower_some = 0;
    // subset CAM: write subset 1010 in all PEs, then match it
    do_op(G_SET_ALL);
    pin_in = '0; sub = {T_1, T_0, T_1, T_0}; do_op(G_WRITE_ALL);
    sub = {T_1, T_0, T_1, T_1}; do_op(G_MATCH); et = '0; check_tags("subset mismatch");
    sub = {T_1, T_X, T_1, T_0}; do_op(G_MATCH); et = '1; check_tags("subset match");
    sub = '0;
    // exchange back and stream the pixels out, PE 63 first
    do_op(G_VSR_XFER);
    for (int i = N_PE-1; i >= 0; i--) begin
      checks++;
      if (vout !== pix[i]) begin failures++; $display("vout PE %0d %0d exp %0d", i, vout, pix[i]); end
      vsr_shift = 1; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

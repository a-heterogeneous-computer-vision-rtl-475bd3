// tb_glitch_pe -- self-checking test of one GLiTCH PE.  A reference model
// keeps the CAM word as digits 0/1/2 (2 = don't care) and predicts match,
// tag and R after random writes, matches and ALU operations.
module tb_glitch_pe;
  import apa_pkg::*;

  logic clk = 0, rst_n = 0;
  gop_e op;
  dword_t pat_d, wr_d, word;
  sword_t pat_s, sub;
  logic tag_prev, tag_next, first_ok, xfer, tag, r;
  int checks = 0, failures = 0;

  int mw[DATA_DIGITS];   // model data word
  int ms[SUB_DIGITS];
  bit mtag, mr;

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  glitch_pe dut (.*);

  function automatic int dig(tdigit_t d); return d[1] ? int'(d[0]) : 2; endfunction
  function automatic tdigit_t rdig(int pct_x);
    int v = $urandom_range(99);
    if (v < pct_x) return T_X;
    return $urandom_range(1) ? T_1 : T_0;
  endfunction

  function automatic bit model_match();
    for (int i = 0; i < DATA_DIGITS; i++)
      if (dig(pat_d[i]) != 2 && mw[i] != 2 && dig(pat_d[i]) != mw[i]) return 0;
    for (int i = 0; i < SUB_DIGITS; i++)
      if (dig(pat_s[i]) != 2 && ms[i] != 2 && dig(pat_s[i]) != ms[i]) return 0;
    return 1;
  endfunction

  task automatic step_op(gop_e o);
    bit m = model_match();
    op = o;
    @(posedge clk); #1;
    case (o)
      G_MATCH: mtag = m;  G_MATCH_AND: mtag &= m;  G_MATCH_OR: mtag |= m;
      G_WRITE, G_WRITE_ALL: if (o == G_WRITE_ALL || mtag) begin
        for (int i = 0; i < DATA_DIGITS; i++) if (dig(pat_d[i]) != 2) mw[i] = dig(pat_d[i]);
        for (int i = 0; i < SUB_DIGITS; i++)  if (dig(pat_s[i]) != 2) ms[i] = dig(pat_s[i]);
      end
      G_SHIFT_UP: mtag = tag_prev;  G_SHIFT_DN: mtag = tag_next;
      G_FIRST: mtag &= first_ok;  G_SET_ALL: mtag = 1;  G_CLR_ALL: mtag = 0;
      G_NOT: mtag = !mtag;  G_R_LD: mr = mtag;  G_TAG_LD_R: mtag = mr;
      G_TAG_AND_R: mtag &= mr;  G_TAG_OR_R: mtag |= mr;  G_TAG_XOR_R: mtag ^= mr;
      default: ;
    endcase
    checks++;
    if (tag !== mtag || r !== mr) begin
      failures++; $display("op %s tag %b/%b r %b/%b", o.name(), tag, mtag, r, mr);
    end
    for (int i = 0; i < DATA_DIGITS; i++) if (dig(word[i]) != mw[i]) begin
      failures++; $display("op %s digit %0d %0d/%0d", o.name(), i, dig(word[i]), mw[i]); break;
    end
    op = G_NOP;
  endtask

  initial begin
    op = G_NOP; pat_d = '0; pat_s = '0; wr_d = '0; xfer = 0;
    tag_prev = 0; tag_next = 0; first_ok = 1;
    foreach (mw[i]) mw[i] = 2; foreach (ms[i]) ms[i] = 2; mtag = 0; mr = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // fill the word with known digits
    foreach (pat_d[i]) pat_d[i] = rdig(0);
    foreach (pat_s[i]) pat_s[i] = rdig(0);
    step_op(G_WRITE_ALL);
    // exact match, then a single mismatching digit
    step_op(G_MATCH);
    if (!tag) begin failures++; $display("exact pattern did not match"); end
    pat_d = '0; pat_d[17] = (mw[17] == 1) ? T_0 : T_1; pat_s = '0;
    step_op(G_MATCH);
    checks++; if (tag) begin failures++; $display("mismatch matched"); end
    for (int n = 0; n < 3000; n++) begin
      gop_e o;
      o = gop_e'($urandom_range(16));
      foreach (pat_d[i]) pat_d[i] = rdig(85);
      foreach (pat_s[i]) pat_s[i] = rdig(60);
      // half the time derive the pattern from the stored word so matches occur
      if ($urandom_range(1)) foreach (pat_d[i]) if (pat_d[i][1] && mw[i] != 2) pat_d[i] = {1'b1, mw[i][0]};
      if ($urandom_range(1)) foreach (pat_s[i]) if (pat_s[i][1] && ms[i] != 2) pat_s[i] = {1'b1, ms[i][0]};
      tag_prev = $urandom_range(1); tag_next = $urandom_range(1); first_ok = $urandom_range(1);
      step_op(o);
    end
    // video transfer write is unconditional
    mtag = 0; step_op(G_CLR_ALL);
    wr_d = '0; wr_d[3] = T_1; wr_d[4] = T_0; xfer = 1; op = G_NOP;
    @(posedge clk); #1 xfer = 0; mw[3] = 1; mw[4] = 0;
    checks++; if (dig(word[3]) != 1 || dig(word[4]) != 0) begin failures++; $display("xfer write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

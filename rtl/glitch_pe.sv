// glitch_pe -- one 1-bit processing element of the GLiTCH associative chip.
//
// Each PE owns a ternary content addressable word: 64 data digits and 4
// subset digits (digit code in apa_pkg: {care, value}, care=0 is 'x').  A
// broadcast pattern is compared with the whole word in one cycle; a digit
// pair matches unless both care and differ, so 'x' on either side masks the
// digit.  The 1-bit ALU combines the match with the tag register and a
// second 1-bit register R, and moves tags along the 1-D PE chain.
//
// Interface: op/pat_d/pat_s are the broadcast control and pattern (valid in
// the same cycle, applied at the clock edge).  tag_prev/tag_next are the
// tags of the neighbouring PEs.  first_ok is high when no PE before this one
// in the array is tagged (resolved by the chip).  wr_d is a per-PE pattern
// written unconditionally when xfer is high (video transfer).  All updates
// take one clock; word/tag/r are the registered state.
//
// From the design: CAM sizes, ternary patterns, 1-bit ALU with 1-bit
// registers, tag-conditional operation without controller intervention.
// Own choices: the opcode set, that a write stores only the cared digits
// (an 'x' digit in a write pattern leaves the stored digit unchanged), and
// that reset clears the CAM to 'x' and both registers to 0.
module glitch_pe
  import apa_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  gop_e   op,
  input  dword_t pat_d,
  input  sword_t pat_s,
  input  logic   tag_prev,
  input  logic   tag_next,
  input  logic   first_ok,
  input  logic   xfer,
  input  dword_t wr_d,
  output dword_t word,
  output sword_t sub,
  output logic   tag,
  output logic   r
);

  logic m;

  always_comb begin
    m = 1'b1;
    for (int i = 0; i < int'(DATA_DIGITS); i++) m &= tmatch(word[i], pat_d[i]);
    for (int i = 0; i < int'(SUB_DIGITS); i++)  m &= tmatch(sub[i],  pat_s[i]);
  end

  // cared digits of p overwrite w
  function automatic dword_t wmerge(dword_t w, dword_t p);
    dword_t o;
    for (int i = 0; i < int'(DATA_DIGITS); i++) o[i] = p[i][1] ? p[i] : w[i];
    return o;
  endfunction

  function automatic sword_t smerge(sword_t w, sword_t p);
    sword_t o;
    for (int i = 0; i < int'(SUB_DIGITS); i++) o[i] = p[i][1] ? p[i] : w[i];
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      sub  <= '0;
      tag  <= 1'b0;
      r    <= 1'b0;
    end else begin
      if (xfer) word <= wmerge(word, wr_d);
      unique case (op)
        G_MATCH:     tag <= m;
        G_MATCH_AND: tag <= tag & m;
        G_MATCH_OR:  tag <= tag | m;
        G_WRITE:     if (tag) begin
                       word <= wmerge(word, pat_d);
                       sub  <= smerge(sub, pat_s);
                     end
        G_WRITE_ALL: begin
                       word <= wmerge(word, pat_d);
                       sub  <= smerge(sub, pat_s);
                     end
        G_SHIFT_UP:  tag <= tag_prev;
        G_SHIFT_DN:  tag <= tag_next;
        G_FIRST:     tag <= tag & first_ok;
        G_SET_ALL:   tag <= 1'b1;
        G_CLR_ALL:   tag <= 1'b0;
        G_NOT:       tag <= ~tag;
        G_R_LD:      r   <= tag;
        G_TAG_LD_R:  tag <= r;
        G_TAG_AND_R: tag <= tag & r;
        G_TAG_OR_R:  tag <= tag | r;
        G_TAG_XOR_R: tag <= tag ^ r;
        default: ;
      endcase
    end
  end

endmodule

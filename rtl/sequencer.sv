// sequencer -- micromemory sequencer of the APA controller.
//
// Computes the next micromemory address every cycle from the SEQ, addr and
// CC fields of the current microinstruction and the condition flags, so that
// high level control structures run directly in hardware: conditional jumps
// (IF, DO WHILE exits and back edges), nested subroutine calls and returns
// (return address stack), counted loops (loop stack of start address and
// count; the body runs count+1 times), a multiway CASE branch (addr plus a
// 4-bit index from the scalar unit), WAIT for a condition, and HALT.
//
// Interface: ir_* is the microinstruction being issued at address pc.  When
// issue is low nothing advances and the memory re-reads pc.  load forces the
// microprogram pointer to start (host command).  uaddr is the read address
// of the micromemory (combinational); pc follows it one clock later.  A
// condition is the selected flag XOR cc_inv; CC_ALWAYS is always true.
// halted is high in the cycle a HALT issues (combinational); err is sticky after a stack
// overflow or underflow (the offending push or pop is dropped).
//
// Timing: the branch decision uses the flags present in the issue cycle and
// takes effect on the very next fetch, with no delay slot in the sequencer
// itself.  The flags come from units further down the pipeline, so the
// compiler has to place conditions early enough; nothing here checks that.
// From the design: loop and nested subroutine support, CASE and DO WHILE,
// compiler-managed pipeline consistency.  Own choices: the opcode set and
// encoding, stack depths (16), counter width (15).
module sequencer
  import apa_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            issue,
  input  logic            load,
  input  logic [UAW-1:0]  start,
  input  sop_e            ir_op,
  input  logic [UAW-1:0]  ir_addr,
  input  cc_e             ir_cc,
  input  logic            ir_inv,
  input  logic [7:0]      flags,     // indexed by cc_e
  input  logic [3:0]      case_idx,
  output logic [UAW-1:0]  uaddr,
  output logic [UAW-1:0]  pc,
  output logic            halted,
  output logic            err
);

  localparam int unsigned SPW = $clog2(DEPTH + 1);
  localparam int unsigned IW  = $clog2(DEPTH);

  logic [UAW-1:0] cstk  [DEPTH];
  logic [UAW-1:0] lstart[DEPTH];
  logic [UAW-1:0] lcnt  [DEPTH];
  logic [SPW-1:0] csp, lsp;
  logic           cond;
  logic [UAW-1:0] nxt, inc;
  logic           push_c, pop_c, push_l, pop_l, dec_l;

  assign inc  = pc + 1'b1;
  assign cond = (ir_cc == CC_ALWAYS) ? !ir_inv : (flags[ir_cc] ^ ir_inv);

  always_comb begin
    nxt    = inc;
    push_c = 1'b0;
    pop_c  = 1'b0;
    push_l = 1'b0;
    pop_l  = 1'b0;
    dec_l  = 1'b0;
    unique case (ir_op)
      S_JUMP:    if (cond) nxt = ir_addr;
      S_CALL:    if (cond) begin nxt = ir_addr; push_c = 1'b1; end
      S_RET:     if (cond) begin
                   pop_c = 1'b1;
                   if (csp != 0) nxt = cstk[csp-1];
                 end
      S_LOOP:    push_l = 1'b1;
      S_ENDLOOP: if (lsp != 0) begin
                   if (lcnt[lsp-1] != 0) begin
                     nxt   = lstart[lsp-1];
                     dec_l = 1'b1;
                   end else pop_l = 1'b1;
                 end else pop_l = 1'b1;
      S_CASE:    nxt = ir_addr + UAW'(case_idx);
      S_WAIT:    if (!cond) nxt = pc;
      S_HALT:    nxt = pc;
      default: ;
    endcase
  end

  assign halted = issue && !load && (ir_op == S_HALT);

  always_comb begin
    if (load)       uaddr = start;
    else if (issue) uaddr = nxt;
    else            uaddr = pc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      csp    <= '0;
      lsp    <= '0;
      err    <= 1'b0;
    end else begin
      pc     <= uaddr;
      if (load) begin
        csp <= '0;
        lsp <= '0;
        err <= 1'b0;
      end else if (issue) begin
        if (push_c) begin
          if (csp == SPW'(DEPTH)) err <= 1'b1;
          else begin cstk[csp[IW-1:0]] <= inc; csp <= csp + 1'b1; end
        end
        if (pop_c) begin
          if (csp == 0) err <= 1'b1;
          else csp <= csp - 1'b1;
        end
        if (push_l) begin
          if (lsp == SPW'(DEPTH)) err <= 1'b1;
          else begin
            lstart[lsp[IW-1:0]] <= inc;
            lcnt[lsp[IW-1:0]]   <= ir_addr;
            lsp         <= lsp + 1'b1;
          end
        end
        if (dec_l) lcnt[lsp-1] <= lcnt[lsp-1] - 1'b1;
        if (pop_l) begin
          if (lsp == 0) err <= 1'b1;
          else lsp <= lsp - 1'b1;
        end
      end
    end
  end

endmodule

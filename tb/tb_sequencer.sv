// tb_sequencer -- self-checking test of the micromemory sequencer.  A small
// microprogram (held in a testbench array standing in for the micromemory,
// with its one-clock read) exercises a counted loop around nested
// subroutine calls, a conditional return, a not-taken conditional jump, a
// CASE branch, a WAIT on a host flag and HALT.  The sequence of issued
// addresses is compared with the hand-derived trace, one address per cycle.
// Finally a return with an empty stack must raise err.
module tb_sequencer;
  import apa_pkg::*;
  logic clk = 0, rst_n = 0, issue, load, halted, err;
  logic [14:0] start, uaddr, pc;
  sop_e ir_op; logic [14:0] ir_addr; cc_e ir_cc; logic ir_inv;
  logic [7:0] flags; logic [3:0] case_idx;
  int checks = 0, failures = 0;

  typedef struct { sop_e op; int a; cc_e cc; bit inv; } ins_t;
  ins_t prog [64];
  ins_t ir;

  always #5 clk = ~clk;
  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  sequencer dut (.*);

  assign ir_op = ir.op; assign ir_addr = 15'(ir.a); assign ir_cc = ir.cc; assign ir_inv = ir.inv;
  always_ff @(posedge clk) ir <= prog[uaddr[5:0]];

  function automatic ins_t I(sop_e op, int a = 0, cc_e cc = CC_ALWAYS, bit inv = 0);
    ins_t x; x.op = op; x.a = a; x.cc = cc; x.inv = inv; return x;
  endfunction

  int exp_trace[$] = '{0,1, 2,10,15,11,3, 2,10,15,11,3, 2,10,15,11,3, 4,5,32,6,6,6,7};

  initial begin
    int waits, halt_seen;
    foreach (prog[i]) prog[i] = I(S_CONT);
    prog[0]  = I(S_CONT);
    prog[1]  = I(S_LOOP, 2);
    prog[2]  = I(S_CALL, 10);
    prog[3]  = I(S_ENDLOOP);
    prog[4]  = I(S_JUMP, 20, CC_SOME);
    prog[5]  = I(S_CASE, 30);
    prog[32] = I(S_JUMP, 6);
    prog[6]  = I(S_WAIT, 0, CC_HOST);
    prog[7]  = I(S_HALT);
    prog[10] = I(S_CALL, 15);
    prog[11] = I(S_RET);
    prog[15] = I(S_RET, 0, CC_SU_ZERO, 1);
    prog[20] = I(S_HALT);
    issue = 0; load = 0; start = 0; flags = 8'h00; case_idx = 2;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    load = 1; start = 0; @(posedge clk); #1 load = 0;
    issue = 1; waits = 0; halt_seen = 0;
    foreach (exp_trace[k]) begin
      checks++;
      if (int'(pc) != exp_trace[k]) begin failures++; $display("step %0d pc %0d exp %0d", k, pc, exp_trace[k]); end
      if (pc == 6) begin waits++; if (waits == 3) flags[CC_HOST] = 1; end
      if (halted) halt_seen++;
      @(posedge clk); #1;
    end
    // the HALT at 7 is issued in the last step; pc must stay at 7
    repeat (3) @(posedge clk); #1;
    checks++; if (pc != 7 || halt_seen != 1) begin failures++; $display("halt pc %0d", pc); end
    checks++; if (err) begin failures++; $display("unexpected err"); end
    // a return with an empty stack
    issue = 0; load = 1; start = 11; @(posedge clk); #1 load = 0; issue = 1;
    @(posedge clk); #1;
    checks++; if (!err) begin failures++; $display("stack underflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

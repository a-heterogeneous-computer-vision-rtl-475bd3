// tb_apa_controller -- self-checking test of the APA controller on its own:
// a short microprogram is downloaded through the host port and run.  The
// test checks the issued microinstruction stream (a taken conditional branch
// on an external flag, a T_ATTN, HALT), that each field reaches stage E1 one
// clock and stage E2 two clocks after issue, that NOPs enter the pipeline
// while stopped, and the host-visible status.
module tb_apa_controller;
  import apa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic h_en, h_we, h_rvalid, attn;
  logic [18:0] h_addr;
  logic [31:0] h_wdata, h_rdata, mbox_in, bus_in;
  logic ds_en, ds_we; logic [11:0] ds_addr; logic [31:0] ds_wdata, ds_rdata;
  logic [7:0] flags_in; logic [3:0] case_idx;
  uinstr_t e0, e1, e2;
  logic [14:0] pc; logic seq_err;
  int checks = 0, failures = 0;
  uinstr_t hist[$];
  uinstr_t prog[8];

  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  apa_controller #(.DEPTH(1024)) dut (.*);

  localparam int CTL = 2 << 17;
  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic hw(int a, logic [31:0] d);
    h_en = 1; h_we = 1; h_addr = 19'(a); h_wdata = d; @(posedge clk); #1 h_en = 0; h_we = 0;
  endtask
  task automatic hr(int a, output logic [31:0] d);
    h_en = 1; h_we = 0; h_addr = 19'(a); @(posedge clk); #1 h_en = 0; d = h_rdata;
  endtask

  // pipeline monitor: E1 and E2 must replay E0 one and two clocks later
  uinstr_t p1, p2;
  always @(posedge clk) if (rst_n) begin
    chk(e1 == p1 && e2 == p2, "pipeline stages E1/E2");
    p2 = p1; p1 = e0;
    if (e0 != UNOP) hist.push_back(e0);
  end

  initial begin
    logic [31:0] d;
    logic [95:0] b;
    h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0; ds_rdata = 0; bus_in = 0;
    flags_in = '0; flags_in[CC_SOME] = 1; case_idx = 0;
    p1 = UNOP; p2 = UNOP;
    foreach (prog[i]) prog[i] = UNOP;
    prog[0].g_op = G_MATCH; prog[0].ds_op = D_RD; prog[0].ds_addr = 5; prog[0].bus_src = B_DS;
    prog[1].seq_op = S_JUMP; prog[1].seq_addr = 4; prog[1].cc = CC_SOME;
    prog[2].seq_op = S_HALT; prog[2].g_op = G_NOT;
    prog[4].sutr_sel = 1; prog[4].sutr_op = T_ATTN; prog[4].drn_op = R_BCAST; prog[4].spare = 7'h55;
    prog[5].seq_op = S_HALT; prog[5].ram_op = M_RD;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    foreach (prog[i]) begin
      b = prog[i];
      hw((i << 2) | 0, b[31:0]); hw((i << 2) | 1, b[63:32]); hw((i << 2) | 2, b[95:64]);
    end
    chk(hist.size() == 0, "nothing issued while stopped");
    hw(CTL | 1, 0);
    hw(CTL | 0, 1);
    repeat (10) @(posedge clk); #1;
    chk(hist.size() == 4, $sformatf("four instructions issued (%0d)", hist.size()));
    if (hist.size() == 4) begin
      chk(hist[0] == prog[0], "issue 0");
      chk(hist[1] == prog[1], "issue 1 (branch)");
      chk(hist[2] == prog[4], "issue 4 (branch target)");
      chk(hist[3] == prog[5], "issue 5 (halt)");
    end
    chk(attn, "attention from T_ATTN");
    hr(CTL | 3, d);
    chk(d[14:0] == 5 && d[17] && !d[16] && !d[19], $sformatf("status %h", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_host_if -- self-checking test of the host transputer interface: the
// staged 96-bit micromemory download, the data store pass-through, START,
// run / single step / breakpoint / HALT control of issue, attention request
// and acknowledge, and both mailboxes and the status word.  A counter
// stands in for the sequencer (pc advances on every issued instruction).
module tb_host_if;
  import apa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic h_en, h_we, h_rvalid, attn;
  logic [18:0] h_addr;
  logic [31:0] h_wdata, h_rdata;
  logic um_we; logic [14:0] um_waddr; logic [95:0] um_wdata;
  logic ds_en, ds_we; logic [11:0] ds_addr; logic [31:0] ds_wdata, ds_rdata;
  logic [14:0] pc, start; logic halted, seq_err, issue, load, host_flag;
  logic attn_set, put; logic [31:0] bus_in, mbox_in;
  int checks = 0, failures = 0, issued = 0;

  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  host_if dut (.*);

  // stand-in sequencer
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pc <= 0;
    else if (load) pc <= start;
    else if (issue) pc <= pc + 1;
  always_ff @(posedge clk) if (issue) issued <= issued + 1;
  assign ds_rdata = 32'hD5000000 | 32'(ds_addr);

  task automatic chk(logic ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic hw(int a, logic [31:0] d);
    h_en = 1; h_we = 1; h_addr = 19'(a); h_wdata = d; @(posedge clk); #1 h_en = 0; h_we = 0;
  endtask
  task automatic hr(int a, output logic [31:0] d);
    h_en = 1; h_we = 0; h_addr = 19'(a); @(posedge clk); #1 h_en = 0;
    chk(h_rvalid, "rvalid"); d = h_rdata;
  endtask
  localparam int CTL = 2 << 17, DS = 1 << 17;

  initial begin
    logic [31:0] d;
    int n0;
    h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0; halted = 0; seq_err = 0;
    attn_set = 0; put = 0; bus_in = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(!issue, "idle after reset");
    // micromemory word 0x1234 in three parts; only the third writes
    h_en = 1; h_we = 1; h_addr = 19'((16'h1234 << 2) | 0); h_wdata = 32'hAAAA0000; #1;
    chk(!um_we, "part 0 no write"); @(posedge clk); #1;
    h_addr = 19'((16'h1234 << 2) | 1); h_wdata = 32'hBBBB1111; @(posedge clk); #1;
    h_addr = 19'((16'h1234 << 2) | 2); h_wdata = 32'hCCCC2222; #1;
    chk(um_we && um_waddr == 15'h1234 && um_wdata == {32'hCCCC2222, 32'hBBBB1111, 32'hAAAA0000}, "um write");
    @(posedge clk); #1 h_en = 0; h_we = 0;
    // data store pass-through
    h_en = 1; h_we = 1; h_addr = 19'(DS | 12'h0AB); h_wdata = 32'h55; #1;
    chk(ds_en && ds_we && ds_addr == 12'h0AB && ds_wdata == 32'h55, "ds write");
    @(posedge clk); #1 h_en = 0;
    hr(DS | 12'h0CD, d); chk(d == 32'hD50000CD, "ds read");
    // START sets the pointer; run issues every cycle
    h_en = 1; h_we = 1; h_addr = 19'(CTL | 1); h_wdata = 32'd100; #1;
    chk(load && start == 15'd100, "start");
    @(posedge clk); #1 h_en = 0;
    chk(pc == 100, "pc loaded");
    hw(CTL | 2, 32'd110);          // breakpoint at 110
    hw(CTL | 0, 32'h5);            // run, breakpoint enabled
    repeat (20) @(posedge clk); #1;
    chk(pc == 110 && !issue, "stopped at breakpoint");
    hr(CTL | 3, d); chk(d[14:0] == 110 && !d[16], "status at breakpoint");
    // single step from the breakpoint
    n0 = issued; hw(CTL | 0, 32'h6); repeat (3) @(posedge clk); #1;
    chk(issued - n0 == 1 && pc == 111, "single step");
    // run on; HALT from the sequencer stops it
    hw(CTL | 0, 32'h1); repeat (4) @(posedge clk);
    halted = 1; @(posedge clk); #1 halted = 0; @(posedge clk); #1;
    chk(!issue, "halt clears run");
    hr(CTL | 3, d); chk(d[17] && !d[16], "status halted");
    // attention request and acknowledge
    attn_set = 1; @(posedge clk); #1 attn_set = 0;
    chk(attn, "attn raised");
    hw(CTL | 4, 0); chk(!attn, "attn cleared");
    // mailboxes and host flag
    hw(CTL | 5, 32'hFEEDBEEF); chk(mbox_in == 32'hFEEDBEEF, "mbox in");
    bus_in = 32'h0BADF00D; put = 1; @(posedge clk); #1 put = 0;
    hr(CTL | 6, d); chk(d == 32'h0BADF00D, "mbox out");
    hw(CTL | 0, 32'h8); chk(host_flag && !issue, "host flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

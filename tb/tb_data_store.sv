// tb_data_store -- self-checking test of the data store: host writes and
// reads, controller direct reads and writes with the E0/E1 timing, address
// register loads (from the field and from the bus), post-increment and
// pre-decrement access used as a parameter stack, against a model memory.
module tb_data_store;
  import apa_pkg::*;
  localparam int AW = 12;
  logic clk = 0, rst_n = 0;
  dop_e op;
  logic [1:0] ar_sel;
  logic [AW-1:0] addr, h_addr;
  logic [31:0] bus_in, rdata, h_wdata, h_rdata;
  logic [3:0][AW-1:0] ar;
  logic h_en, h_we;
  logic [31:0] model [int];
  int mar[4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  data_store #(.AW(AW)) dut (.*);

  task automatic chk(logic [31:0] got, logic [31:0] e, string what);
    checks++;
    if (got !== e) begin failures++; $display("%s got %h exp %h", what, got, e); end
  endtask

  // issue one controller op in E0; bus value supplied in E1; returns read data
  task automatic ctl(dop_e o, int a, int r, logic [31:0] busv, output logic [31:0] q);
    op = o; addr = AW'(a); ar_sel = 2'(r);
    @(posedge clk); #1;
    op = D_NOP; bus_in = busv; q = rdata;
    @(posedge clk); #1;
    bus_in = 'x;
  endtask

  initial begin
    logic [31:0] q, v;
    int a;
    op = D_NOP; ar_sel = 0; addr = 0; bus_in = 0; h_en = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // host fills 32 words
    for (int i = 0; i < 32; i++) begin
      h_en = 1; h_we = 1; h_addr = AW'(100 + i); h_wdata = $urandom(); model[100 + i] = h_wdata;
      @(posedge clk); #1;
    end
    h_en = 0;
    // controller direct reads
    for (int i = 0; i < 32; i++) begin ctl(D_RD, 100 + i, 0, 0, q); chk(q, model[100 + i], "direct read"); end
    // controller direct writes, host reads back
    for (int i = 0; i < 16; i++) begin
      v = $urandom(); ctl(D_WR, 200 + i, 0, v, q); model[200 + i] = v;
    end
    for (int i = 0; i < 16; i++) begin
      h_en = 1; h_we = 0; h_addr = AW'(200 + i); @(posedge clk); #1 h_en = 0;
      chk(h_rdata, model[200 + i], "host read");
    end
    // AR1 as a parameter stack at 300: push 5 words, pop them in reverse
    ctl(D_LD_AR, 300, 1, 0, q); mar[1] = 300;
    chk(32'(ar[1]), 300, "ld ar");
    for (int i = 0; i < 5; i++) begin
      v = $urandom(); ctl(D_WR_INC, 0, 1, v, q); model[mar[1]] = v; mar[1]++;
    end
    chk(32'(ar[1]), 305, "ar after push");
    for (int i = 0; i < 5; i++) begin
      mar[1]--; ctl(D_RD_DEC, 0, 1, 0, q); chk(q, model[mar[1]], "pop");
    end
    chk(32'(ar[1]), 300, "ar after pop");
    // AR2 loaded from the bus, indirect read without update, post-increment read
    ctl(D_LD_ARB, 0, 2, 32'd105, q);
    chk(32'(ar[2]), 105, "ld ar from bus");
    ctl(D_RD_AR, 0, 2, 0, q); chk(q, model[105], "read [ar]");
    ctl(D_RD_INC, 0, 2, 0, q); chk(q, model[105], "read [ar]+");
    ctl(D_RD_INC, 0, 2, 0, q); chk(q, model[106], "read [ar]+ 2");
    ctl(D_WR_AR, 0, 2, 32'hCAFE0001, q); model[107] = 32'hCAFE0001;
    ctl(D_RD, 107, 0, 0, q); chk(q, model[107], "write [ar]");
    // back-to-back: write then read of the same word in consecutive instructions
    op = D_WR; addr = 400; @(posedge clk); #1;
    op = D_RD; addr = 400; bus_in = 32'h12345678; @(posedge clk); #1;
    op = D_NOP; @(posedge clk); #1;
    op = D_RD; addr = 400; @(posedge clk); #1; op = D_NOP;
    chk(rdata, 32'h12345678, "write then read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

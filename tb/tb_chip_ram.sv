// tb_chip_ram -- self-checking test of the per-chip RAM: random writes and
// reads against an associative-array model, including a read and a write in
// the same cycle; read data must appear exactly one clock after re.
module tb_chip_ram;
  localparam int AW = 10;
  logic clk = 0, re = 0, we = 0;
  logic [AW-1:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  chip_ram #(.AW(AW)) dut (.*);

  initial begin
    raddr = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < 64; a++) begin
      we = 1; waddr = AW'(a); wdata = $urandom(); model[a] = wdata; @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      int ra;
      logic [31:0] exp;
      ra = $urandom_range(63);
      re = 1; raddr = AW'(ra); exp = model[ra];
      we = $urandom_range(1); waddr = AW'($urandom_range(63)); wdata = $urandom();
      if (we) model[int'(waddr)] = wdata;
      if (we && waddr == raddr) exp = model[ra];   // write and read same address: either is a choice; skip
      @(posedge clk); #1;
      re = 0; we = 0;
      if (!(int'(waddr) == ra)) begin
        checks++;
        if (rdata !== exp) begin failures++; $display("addr %0d got %h exp %h", ra, rdata, exp); end
      end
      // data must hold while re is low
      @(posedge clk); #1;
      if (!(int'(waddr) == ra)) begin
        checks++;
        if (rdata !== exp) begin failures++; $display("hold addr %0d", ra); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

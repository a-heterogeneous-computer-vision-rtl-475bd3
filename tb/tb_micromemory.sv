// tb_micromemory -- self-checking test of the full-size micromemory
// (32 kword x 96 bit): random words written across the whole address range
// and read back one clock after the address, while other words are written.
module tb_micromemory;
  import apa_pkg::*;
  logic clk = 0, we = 0;
  logic [14:0] raddr, waddr;
  logic [95:0] rdata, wdata;
  logic [95:0] model [int];
  int addrs[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  micromemory dut (.*);

  initial begin
    raddr = 0; waddr = 0; wdata = 0;
    // first and last word, then random ones
    addrs.push_back(0); addrs.push_back(32767);
    for (int i = 0; i < 500; i++) addrs.push_back($urandom_range(32767));
    foreach (addrs[i]) begin
      we = 1; waddr = 15'(addrs[i]); wdata = {$urandom(), $urandom(), $urandom()};
      model[addrs[i]] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    foreach (addrs[i]) begin
      raddr = 15'(addrs[i]);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addrs[i]]) begin failures++; $display("addr %0d", addrs[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vsr -- self-checking test of the video shift register: a stream of
// pixels is shifted through with gaps; each output pixel must be the one
// that entered DEPTH shifts earlier.  A parallel load must appear at once
// and then stream out in order.
module tb_vsr;
  import apa_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0, shift = 0, ld = 0;
  logic [PIX_W-1:0] vin, vout;
  logic [D-1:0][PIX_W-1:0] ld_data, q;
  int checks = 0, failures = 0;
  byte unsigned hist[$];

  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  vsr #(.DEPTH(D)) dut (.*);

  initial begin
    vin = 0; ld_data = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < D; i++) hist.push_back(0);
    for (int n = 0; n < 600; n++) begin
      shift = ($urandom_range(3) != 0);
      vin = $urandom();
      @(posedge clk); #1;
      if (shift) begin
        hist.push_back(vin);
        void'(hist.pop_front());
      end
      checks++;
      if (vout !== hist[0]) begin failures++; $display("n %0d vout %0d exp %0d", n, vout, hist[0]); end
    end
    // parallel load then stream out: stage i holds byte 3*i+1
    shift = 0;
    for (int i = 0; i < D; i++) ld_data[i] = 8'(3*i + 1);
    ld = 1; @(posedge clk); #1 ld = 0;
    for (int i = 0; i < D; i++) begin
      checks++;
      if (q[i] !== 8'(3*i + 1)) begin failures++; $display("ld stage %0d", i); end
    end
    for (int i = D-1; i >= 0; i--) begin
      checks++;
      if (vout !== 8'(3*i + 1)) begin failures++; $display("out %0d got %0d", i, vout); end
      shift = 1; vin = 0; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

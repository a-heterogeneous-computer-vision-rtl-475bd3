// tb_emu_clock_sync -- self-checking test of the emulator clock pulse
// synchroniser.  Four stand-in emulators finish each emulated cycle after
// random delays; the pulse must rise exactly one reference clock after the
// slowest one reports, never earlier, last PULSE_W clocks, and be counted.
module tb_emu_clock_sync;
  localparam int NE = 4, PW = 2;
  logic clk = 0, rst_n = 0, emu_clk;
  logic [NE-1:0] ready;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  emu_clock_sync #(.N_EMU(NE), .PULSE_W(PW)) dut (.*);

  initial begin
    int delay[NE], last, t, width;
    ready = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      last = 0;
      for (int i = 0; i < NE; i++) begin delay[i] = $urandom_range(12); if (delay[i] > last) last = delay[i]; end
      // walk the cycles of this round; emulator i reports after delay[i] clocks
      for (t = 0; t <= last; t++) begin
        for (int i = 0; i < NE; i++) if (delay[i] == t) ready[i] = ~ready[i];
        @(posedge clk); #1;
        checks++;
        if (emu_clk !== (t == last)) begin
          failures++; $display("round %0d t %0d last %0d emu_clk %b", r, t, last, emu_clk);
        end
      end
      width = 0;
      while (emu_clk) begin width++; @(posedge clk); #1; end
      checks++;
      if (width != PW) begin failures++; $display("pulse width %0d", width); end
      checks++;
      if (cycles != 32'(r + 1)) begin failures++; $display("count %0d exp %0d", cycles, r + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// emu_clock_sync -- irregular clock pulse generator shared by the GLiTCH
// chip emulators.
//
// In the emulator most of a GLiTCH chip is evaluated in software on a
// transputer, so one emulated clock cycle takes a variable time.  Each
// emulator's processor signals that it has finished the current cycle by
// toggling a bit on an output port (ready[i]).  The four emulated chips must
// stay in lock step, so the emulated clock pulse is issued only when the
// slowest of them has finished: a finished flag is latched per emulator on
// each change of its ready bit, and when all are set one pulse of PULSE_W
// reference clocks is driven on emu_clk and the flags are cleared.  A ready
// change during the pulse counts for the next cycle.  cycles counts the
// pulses issued.
//
// Timing: emu_clk rises on the reference clock after the last emulator's
// ready change is seen (that change is registered once first).
// From the design: software-set port bit as the clock source, and pulse
// generation synchronised among the four emulators to the slowest one.  Own
// choices: toggle signalling, the pulse width and the counter.
module emu_clock_sync #(
  parameter int unsigned N_EMU   = 4,
  parameter int unsigned PULSE_W = 2,
  parameter int unsigned CNT_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_EMU-1:0]  ready,
  output logic              emu_clk,
  output logic [CNT_W-1:0]  cycles
);

  logic [N_EMU-1:0] ready_q, done;
  logic [$clog2(PULSE_W+1)-1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready_q <= '0;
      done    <= '0;
      hold    <= '0;
      emu_clk <= 1'b0;
      cycles  <= '0;
    end else begin
      ready_q <= ready;
      if (hold != 0) begin
        hold    <= hold - 1'b1;
        emu_clk <= (hold != 1);
        done    <= done | (ready ^ ready_q);
      end else if (&(done | (ready ^ ready_q))) begin
        done    <= '0;
        hold    <= PULSE_W[$bits(hold)-1:0];
        emu_clk <= 1'b1;
        cycles  <= cycles + 1'b1;
      end else begin
        done    <= done | (ready ^ ready_q);
      end
    end
  end

endmodule

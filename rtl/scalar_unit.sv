// scalar_unit -- the small scalar unit of the APA module: a 32-bit register
// that is loaded from the data routing bus, shifted, and tested, with its
// condition flags going to the sequencer.  Heavier scalar work is left to the
// host transputer.
//
// Operations (apa_pkg::uop_e, count/bit number n = arg): load from the bus,
// logical shift left/right, arithmetic shift right, rotate left, and test of
// bit n.  Flags: zero and neg follow the register; test holds the result of
// the last U_TEST.  The register drives the bus when selected as source.
//
// Timing: the operation executes in pipeline stage E1 (when the bus carries
// the same microinstruction's source) and its result is visible from the
// next cycle.  From the design: shift and test of scalar values, flags to the
// sequencer.  Own choices: width, operation list, flag set.
module scalar_unit
  import apa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  uop_e              op,
  input  logic [4:0]        arg,
  input  logic [BUS_W-1:0]  bus_in,
  output logic [BUS_W-1:0]  s,
  output logic              f_zero,
  output logic              f_neg,
  output logic              f_test
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s      <= '0;
      f_test <= 1'b0;
    end else begin
      unique case (op)
        U_LOAD: s      <= bus_in;
        U_SHL:  s      <= s << arg;
        U_SHR:  s      <= s >> arg;
        U_ASR:  s      <= $signed(s) >>> arg;
        U_ROL:  s      <= (s << arg) | (s >> ((BUS_W - 32'(arg)) % BUS_W));
        U_TEST: f_test <= s[arg];
        default: ;
      endcase
    end
  end

  assign f_zero = (s == '0);
  assign f_neg  = s[BUS_W-1];

endmodule

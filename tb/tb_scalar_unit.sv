// tb_scalar_unit -- self-checking test of the scalar unit: random sequences
// of loads, shifts, rotates and bit tests against a model register, with
// the zero, sign and test flags checked after each operation.
module tb_scalar_unit;
  import apa_pkg::*;
  logic clk = 0, rst_n = 0;
  uop_e op;
  logic [4:0] arg;
  logic [31:0] bus_in, s;
  logic f_zero, f_neg, f_test;
  logic [31:0] m; logic mt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  scalar_unit dut (.*);

  initial begin
    op = U_NOP; arg = 0; bus_in = 0; m = 0; mt = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      op = uop_e'($urandom_range(6)); arg = $urandom();
      bus_in = ($urandom_range(7) == 0) ? 0 : $urandom();
      case (op)
        U_LOAD: m = bus_in;
        U_SHL:  m = m << arg;
        U_SHR:  m = m >> arg;
        U_ASR:  for (int k = 0; k < arg; k++) m = {m[31], m[31:1]};
        U_ROL:  for (int k = 0; k < arg; k++) m = {m[30:0], m[31]};
        U_TEST: mt = m[arg];
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (s !== m || f_zero !== (m == 0) || f_neg !== m[31] || f_test !== mt) begin
        failures++; $display("op %s arg %0d s %h exp %h", op.name(), arg, s, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

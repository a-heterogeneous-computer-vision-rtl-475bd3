// tb_drn -- self-checking test of the data routing network: every routing
// mode with random bus, chip and RAM data, checked one clock later against
// the mode's definition; hold; wired-OR bus read-back; RAM write data from
// the chip read port or from the routed pattern.
module tb_drn;
  import apa_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  rop_e op;
  mop_e ram_op;
  logic [31:0] bus_in, bus_out;
  logic [NC-1:0][31:0] chip_rd, ram_rd, ram_wd, chip_pat, exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  drn #(.NC(NC)) dut (.*);

  initial begin
    op = R_HOLD; ram_op = M_NOP; bus_in = 0; chip_rd = '0; ram_rd = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    exp = '0;
    for (int n = 0; n < 2000; n++) begin
      op = rop_e'($urandom_range(6)); ram_op = mop_e'($urandom_range(3));
      bus_in = $urandom();
      for (int i = 0; i < NC; i++) begin chip_rd[i] = $urandom(); ram_rd[i] = $urandom(); end
      #1;
      checks++;
      if (bus_out !== (chip_rd[0] | chip_rd[1] | chip_rd[2] | chip_rd[3])) begin failures++; $display("bus_out"); end
      checks++;
      if (ram_wd !== ((ram_op == M_WP) ? chip_pat : chip_rd)) begin failures++; $display("ram_wd"); end
      case (op)
        R_BCAST:  for (int i = 0; i < NC; i++) exp[i] = bus_in;
        R_RAM:    exp = ram_rd;
        R_UP:     begin exp[0] = bus_in; exp[1] = chip_rd[0]; exp[2] = chip_rd[1]; exp[3] = chip_rd[2]; end
        R_DN:     begin exp[3] = bus_in; exp[2] = chip_rd[3]; exp[1] = chip_rd[2]; exp[0] = chip_rd[1]; end
        R_ROT_UP: begin exp[0] = chip_rd[3]; exp[1] = chip_rd[0]; exp[2] = chip_rd[1]; exp[3] = chip_rd[2]; end
        R_ROT_DN: begin exp[3] = chip_rd[0]; exp[2] = chip_rd[3]; exp[1] = chip_rd[2]; exp[0] = chip_rd[1]; end
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (chip_pat !== exp) begin failures++; $display("mode %s got %h exp %h", op.name(), chip_pat, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

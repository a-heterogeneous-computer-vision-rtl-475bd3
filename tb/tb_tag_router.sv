// tb_tag_router -- exhaustive self-checking test of the tag router over all
// chip edge tags, responder flags and both ring modes.
module tb_tag_router;
  localparam int NC = 4;
  logic rot, some_any;
  logic [NC-1:0] tag_first, tag_last, some, tag_up_in, tag_dn_in, lower_some;
  int checks = 0, failures = 0;

  tag_router #(.NC(NC)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      {rot, tag_first, tag_last, some} = 13'(v);
      #1;
      for (int i = 0; i < NC; i++) begin
        logic eu, ed, el;
        eu = (i > 0) ? tag_last[i-1] : (rot ? tag_last[NC-1] : 1'b0);
        ed = (i < NC-1) ? tag_first[i+1] : (rot ? tag_first[0] : 1'b0);
        el = 0; for (int j = 0; j < i; j++) el |= some[j];
        checks++;
        if (tag_up_in[i] !== eu || tag_dn_in[i] !== ed || lower_some[i] !== el) begin
          failures++; $display("v %h chip %0d", v, i);
        end
      end
      checks++;
      if (some_any !== (some != 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

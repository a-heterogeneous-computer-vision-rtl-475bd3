// tb_pbl -- self-checking test of the pattern broadcast logic: random
// 16-digit pin patterns at every offset, checked digit by digit against
// the placement rule (digit k goes to position (off+k) mod 64, the rest 'x'),
// and the reverse field extraction.
module tb_pbl;
  import apa_pkg::*;
  pword_t pin_pat, pin_out;
  logic [OFF_W-1:0] off;
  dword_t cam_pat, cam_word;
  int checks = 0, failures = 0;

  pbl dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int n = 0; n < 20; n++) begin
        pin_pat = {$urandom(), $urandom()};
        cam_word = {$urandom(), $urandom(), $urandom(), $urandom()};
        off = o[OFF_W-1:0];
        #1;
        for (int p = 0; p < 64; p++) begin
          int k;
          tdigit_t exp;
          k = (p - o + 64) % 64;
          exp = (k < 16) ? pin_pat[k] : T_X;
          checks++;
          if (cam_pat[p] !== exp) begin
            failures++; $display("off %0d pos %0d got %b exp %b", o, p, cam_pat[p], exp);
          end
        end
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (pin_out[k] !== cam_word[(o + k) % 64]) begin
            failures++; $display("read off %0d k %0d", o, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pbl -- pattern broadcast logic (search data aligner) of a GLiTCH chip.
//
// Only 16 ternary digits (32 signals) reach the chip pins, while the CAM
// word has 64 digits (128 bits).  The PBL routes the 16 pin digits to the
// CAM digit positions off .. off+15 of the broadcast pattern and sets every
// other position to 'x', so a 16-digit field can be matched or written at any
// place in the word.  In the other direction it cuts the 16-digit field at
// the same offset out of a CAM word, for reading results off the chip.
//
// Purely combinational.  From the design: 32 pin signals routed among the
// 128 CAM data bits.  Own choice: positions wrap around modulo 64 (a
// rotation), so a field may straddle the end of the word.
module pbl
  import apa_pkg::*;
(
  input  pword_t               pin_pat,   // 16 digits from the pins
  input  logic [OFF_W-1:0]     off,       // digit offset
  output dword_t               cam_pat,   // aligned 64-digit pattern
  input  dword_t               cam_word,  // word to read a field from
  output pword_t               pin_out    // field at off of cam_word
);

  always_comb begin
    cam_pat = '0;   // all 'x'
    for (int k = 0; k < int'(PAT_DIGITS); k++) begin
      cam_pat[(int'(off) + k) % int'(DATA_DIGITS)] = pin_pat[k];
      pin_out[k] = cam_word[(int'(off) + k) % int'(DATA_DIGITS)];
    end
  end

endmodule

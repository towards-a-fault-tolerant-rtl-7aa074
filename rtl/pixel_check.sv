// pixel_check - read-side classifier of the protected image store.
//
// Inputs are the nine bits of a stored word: the seven MSBs, the LSB (1 for
// every encoded star) and the parity bit. With perr = parity XOR (XOR of the
// seven MSBs):
//   error_in_star = LSB & perr
//   star          = error_in_star | (!perr & (any of the seven MSBs set))
// This decodes every single-bit upset correctly: an upset background word
// (weight 1) is never a star, an upset star word is always a star, and
// error_in_star is set exactly when the upset hit the seven MSBs or the
// parity, i.e. when the pixel value itself can no longer be trusted and must
// come from the back-up memory. An upset of the LSB alone leaves the seven
// MSBs intact and is not flagged. Purely combinational.
module pixel_check
  import star_tracker_pkg::*;
(
  input  coded_pixel_t code,
  output logic         star,
  output logic         error_in_star
);
  logic perr, msb_any;

  always_comb begin
    perr          = code.parity ^ (^code.pix[PIX_W-1:1]);
    msb_any       = |code.pix[PIX_W-1:1];
    error_in_star = code.pix[0] & perr;
    star          = error_in_star | (!perr & msb_any);
  end
endmodule

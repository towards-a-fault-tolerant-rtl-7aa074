// star_encoder - write-side encoding of the protected image store.
//
// A thresholded pixel is background when it is zero and star otherwise.
// Background is stored as the all-zero word with parity 0. A star pixel keeps
// its seven most significant bits, has its least significant bit replaced by
// 1 and gets a parity bit equal to the XOR of those seven bits. Every star
// word then differs from the background word in at least three of its nine
// bits, so a single upset can never make one look like the other. The
// unmodified star pixel goes to the back-up memory separately.
//
// Purely combinational. A star pixel of value 1 encodes to a word only one bit
// away from background; the threshold should therefore be 2 or more.
module star_encoder
  import star_tracker_pkg::*;
(
  input  pixel_t       pix,
  output coded_pixel_t code,
  output logic         is_star
);
  always_comb begin
    is_star = (pix != '0);
    if (is_star) begin
      code.pix    = {pix[PIX_W-1:1], 1'b1};
      code.parity = ^pix[PIX_W-1:1];
    end else begin
      code = '0;
    end
  end
endmodule

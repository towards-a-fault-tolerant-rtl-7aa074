// threshold_unit - background removal by fixed thresholding.
//
// The pixel is compared with the threshold; the comparator output (pixel < T)
// selects a 2:1 multiplexer whose input 0 is the pixel and input 1 is ground.
// Pixels below the threshold therefore become 0 (background) and all others
// pass unchanged, so star intensities are preserved for centroiding.
// Purely combinational, one pixel per cycle in series with the stream.
// A pixel equal to the threshold is kept (the comparison is strictly "less").
module threshold_unit
  import star_tracker_pkg::*;
(
  input  pixel_t pix_in,
  input  pixel_t threshold,
  output pixel_t pix_out
);
  always_comb pix_out = (pix_in < threshold) ? '0 : pix_in;
endmodule

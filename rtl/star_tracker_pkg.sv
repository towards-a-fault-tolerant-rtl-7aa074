// star_tracker_pkg - types and constants shared by the protected star-tracker
// image pipeline.
//
// Pixels are 8-bit grayscale values, as delivered by the image sensor. The
// image store keeps each pixel as a 9-bit word: eight pixel bits plus one
// parity bit (see star_encoder and pixel_check). The default frame is VGA,
// 640 x 480, the image size the pipeline is evaluated with.
package star_tracker_pkg;

  localparam int unsigned PIX_W      = 8;    // grayscale pixel width
  localparam int unsigned IMG_WIDTH  = 640;  // pixels per image row (VGA)
  localparam int unsigned IMG_HEIGHT = 480;  // rows per image (VGA)

  typedef logic [PIX_W-1:0] pixel_t;

  // A 3x3 window in the order of the line-buffer registers: index 0..2 is the
  // newest row (R0 newest pixel, R2 oldest), 3..5 the middle row, 6..8 the
  // oldest row. Index 4 (R4) is the centre pixel.
  typedef pixel_t [8:0] window_t;

  // Word kept in the main image memory: encoded pixel and its parity bit.
  typedef struct packed {
    logic   parity;
    pixel_t pix;
  } coded_pixel_t;

endpackage

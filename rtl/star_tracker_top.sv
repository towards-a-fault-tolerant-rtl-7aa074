// star_tracker_top - self-checking image-processing pipeline of a star tracker.
//
// An 8-bit grayscale pixel stream from the image sensor passes through four
// modules, each with its own protection against configuration upsets:
//   acquisition_module  3x3 window from two line FIFOs; decimated comparison
//                       of one pixel along both delay branches -> error1
//   median_filter       19-node exchange network; median checked against a
//                       range built from unused node outputs   -> error2
//   threshold_dmr       background pixels set to 0; two copies compared
//                                                               -> error3
//   image_storage       frame memory in which background upsets are cleared
//                       and star upsets are repaired from a back-up copy
// The three error lines go to the processor, which discards the frame and
// reconfigures the device; here they are sticky flags cleared by reset.
//
// Stream interface: pix_in is taken on every cycle with pix_valid high;
// pix_sof marks the first pixel (top-left) of a frame. Frames are expected
// back to back, IMG_W*IMG_H pixels each. The median for a pixel needs the row
// below it, so the filtered pixel at frame address a is written L = IMG_W+1
// pushes after pixel a was streamed: the last L pixels of a frame are stored
// while the first L pixels of the next frame (or any padding) stream in.
// Windows are built on the raw stream, so at image borders they take pixels
// from the neighbouring row or from what was streamed before the frame. The
// line FIFOs are not cleared by reset, so the first frame after reset should
// be preceded by at least IMG_W+1 pixels of lead-in (any values) for its top
// row to be defined. Centres between frames are not stored. frame_done
// pulses when the last pixel of a frame has been written.
//
// Pipeline: push -> window registers (1 cycle) -> median stage register
// (1 cycle) -> threshold and memory write (1 cycle).
//
// Read interface: see image_storage (rd_start, rd_en, rd_valid, rd_pixel).
//
// The four modules, their order and the three error lines follow the original
// system. Frame framing, border behaviour, pipeline registers and sticky error
// flags are this design's choices.
module star_tracker_top
  import star_tracker_pkg::*;
#(
  parameter int unsigned IMG_W        = IMG_WIDTH,
  parameter int unsigned IMG_H        = IMG_HEIGHT,
  parameter int unsigned BACKUP_DEPTH = 4096,
  localparam int unsigned FRAME = IMG_W * IMG_H,
  localparam int unsigned AW    = $clog2(FRAME),
  localparam int unsigned SCW   = $clog2(BACKUP_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // pixel stream from the image sensor
  input  logic           pix_valid,
  input  logic           pix_sof,
  input  pixel_t         pix_in,
  // configuration
  input  pixel_t         threshold,
  // frame read-out towards the processor
  input  logic           rd_start,
  input  logic           rd_en,
  output logic           rd_valid,
  output pixel_t         rd_pixel,
  output logic           rd_star,
  output logic           rd_corrected,
  // status
  output logic           frame_done,
  output logic [SCW-1:0] star_count,
  output logic           backup_overflow,
  // error-detected lines to the processor
  output logic           error1,
  output logic           error2,
  output logic           error3
);
  localparam int unsigned LAT = IMG_W + 1;           // centre lag in pushes
  localparam int unsigned LCW = $clog2(LAT);

  // ---------------- acquisition ----------------
  window_t win;
  logic    win_valid, win_full, check_strobe;

  acquisition_module #(.LINE_LEN(IMG_W)) u_acq (
    .clk, .rst_n, .pix_valid, .pix_in,
    .win, .win_valid, .win_full, .check_strobe, .error1);

  // ---------------- frame address of the window centre ----------------
  // A pix_sof push arms a countdown of IMG_W pushes; the push after it brings
  // the first pixel of the frame to the window centre (address 0). From there
  // every push advances the write address until the frame is complete.
  logic [LCW-1:0] start_cnt;
  logic           start_pend;
  logic           wr_active;   // addresses 1..FRAME-1 still to come
  logic [AW-1:0]  wa;          // next write address
  logic           ctr_valid;   // centre of the window in win is a frame pixel
  logic [AW-1:0]  ctr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_cnt  <= '0;
      start_pend <= 1'b0;
      wr_active  <= 1'b0;
      wa         <= '0;
      ctr_valid  <= 1'b0;
      ctr_addr   <= '0;
    end else if (pix_valid) begin
      ctr_valid <= 1'b0;
      if (wr_active) begin
        ctr_valid <= 1'b1;
        ctr_addr  <= wa;
        wa        <= wa + 1'b1;
        if (wa == AW'(FRAME - 1)) wr_active <= 1'b0;
      end
      if (pix_sof) begin
        start_pend <= 1'b1;
        start_cnt  <= LCW'(LAT - 1);
      end else if (start_pend) begin
        if (start_cnt == '0) begin
          start_pend <= 1'b0;
          ctr_valid  <= 1'b1;
          ctr_addr   <= '0;
          wa         <= AW'(1);
          wr_active  <= (FRAME > 1);
        end else begin
          start_cnt <= start_cnt - 1'b1;
        end
      end
    end
  end

  // ---------------- noise filtering ----------------
  pixel_t med, range_hi, range_lo;
  logic   err2_now;

  median_filter u_med (.win, .median(med), .range_hi, .range_lo, .error2(err2_now));

  pixel_t        s1_med;
  logic          s1_wr;       // s1_med is a frame pixel to be stored
  logic          s1_valid;    // s1_med is the median of a new window
  logic [AW-1:0] s1_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_med  <= '0;
      s1_wr   <= 1'b0;
      s1_valid <= 1'b0;
      s1_addr <= '0;
      error2  <= 1'b0;
    end else begin
      s1_wr    <= win_valid && ctr_valid;
      s1_valid <= win_valid;
      if (win_valid) begin
        s1_med  <= med;
        s1_addr <= ctr_addr;
        if (err2_now) error2 <= 1'b1;
      end
    end
  end

  // ---------------- threshold ----------------
  pixel_t thr_pix;
  logic   err3_now;

  threshold_dmr u_thr (.pix_in(s1_med), .threshold, .pix_out(thr_pix), .error3(err3_now));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error3     <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      if (s1_valid && err3_now) error3 <= 1'b1;
      frame_done <= s1_wr && (s1_addr == AW'(FRAME - 1));
    end
  end

  // ---------------- image storage ----------------
  image_storage #(.FRAME_PIXELS(FRAME), .BACKUP_DEPTH(BACKUP_DEPTH)) u_store (
    .clk, .rst_n,
    .wr_en(s1_wr), .wr_addr(s1_addr), .wr_pixel(thr_pix),
    .rd_start, .rd_en, .rd_valid, .rd_pixel, .rd_star, .rd_corrected,
    .star_count, .backup_overflow);
endmodule

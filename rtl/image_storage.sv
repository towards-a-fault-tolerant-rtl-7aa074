// image_storage - protected frame store shared with the processor.
//
// Write side (one pixel per wr_en, raster order, address 0 starts a frame):
// star_encoder turns the thresholded pixel into a 9-bit word that goes to the
// main memory at wr_addr. A star pixel (non-zero) is also written unmodified
// into the back-up memory at the next free entry of the write star counter,
// which restarts at 0 with every frame (write to address 0). Stars beyond
// BACKUP_DEPTH are not backed up and set backup_overflow until the next frame
// starts. star_count is the number of star pixels written in the current frame.
//
// Read side (sequential, as the back-up entries are addressed by order):
// rd_start rewinds the read address and the read star counter to 0. Each
// rd_en reads the next main-memory word; one cycle later rd_valid is high and
// pixel_check classifies the word. Background gives 0 (clearing any upset of
// a background word). A star word with a good parity gives its stored 8 bits;
// a star word with a parity error gives the back-up copy (rd_corrected). Every
// star read advances the read star counter. The back-up memory is read every
// cycle at the next value of that counter, so the copy of the next star is
// already on its output when that star is read; there is no extra latency.
//
// rd_pixel, rd_star and rd_corrected are valid while rd_valid is high. A frame
// should not be written while it is being read (one frame buffer). rd_start
// takes precedence over rd_en in the same cycle.
//
// The encoding, the back-up of star pixels, the pixel check, the star counter
// and the two output multiplexers follow the original scheme. The write-side
// star counter, the next-count read of the back-up RAM, the sequential read
// port, the overflow flag and the back-up size are this design's choices.
module image_storage
  import star_tracker_pkg::*;
#(
  parameter int unsigned FRAME_PIXELS = IMG_WIDTH * IMG_HEIGHT,
  parameter int unsigned BACKUP_DEPTH = 4096,
  localparam int unsigned AW  = $clog2(FRAME_PIXELS),
  localparam int unsigned BAW = $clog2(BACKUP_DEPTH),
  localparam int unsigned SCW = $clog2(BACKUP_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // write port (from the threshold module)
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  pixel_t         wr_pixel,
  // read port (towards the processor)
  input  logic           rd_start,
  input  logic           rd_en,
  output logic           rd_valid,
  output pixel_t         rd_pixel,
  output logic           rd_star,
  output logic           rd_corrected,
  // status
  output logic [SCW-1:0] star_count,
  output logic           backup_overflow
);
  // ---------------- write side ----------------
  coded_pixel_t  enc;
  logic          enc_star;
  logic [SCW-1:0] wr_base;   // stars already written in this frame
  logic          bk_we;

  star_encoder u_enc (.pix(wr_pixel), .code(enc), .is_star(enc_star));

  always_comb begin
    wr_base = (wr_addr == '0) ? '0 : star_count;
    bk_we   = wr_en && enc_star && (wr_base < SCW'(BACKUP_DEPTH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      star_count      <= '0;
      backup_overflow <= 1'b0;
    end else if (wr_en) begin
      if (enc_star && wr_base < SCW'(BACKUP_DEPTH)) star_count <= wr_base + 1'b1;
      else                                          star_count <= wr_base;
      if (wr_addr == '0)                     backup_overflow <= 1'b0;
      if (enc_star && !(wr_base < SCW'(BACKUP_DEPTH))) backup_overflow <= 1'b1;
    end
  end

  // ---------------- memories ----------------
  logic [AW-1:0]  rd_addr;
  coded_pixel_t   main_q;
  pixel_t         bk_q;
  logic [SCW-1:0] rd_star_cnt, rd_star_cnt_nx;

  sdp_ram #(.DEPTH(FRAME_PIXELS), .W(PIX_W + 1)) u_main (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(enc),
    .re(rd_en), .raddr(rd_addr), .rdata(main_q));

  sdp_ram #(.DEPTH(BACKUP_DEPTH), .W(PIX_W)) u_backup (
    .clk, .we(bk_we), .waddr(BAW'(wr_base)), .wdata(wr_pixel),
    .re(1'b1), .raddr(BAW'(rd_star_cnt_nx)), .rdata(bk_q));

  // ---------------- read side ----------------
  logic star, err_in_star;

  pixel_check u_chk (.code(main_q), .star, .error_in_star(err_in_star));

  always_comb begin
    if (rd_start)                rd_star_cnt_nx = '0;
    else if (rd_valid && star &&
             rd_star_cnt < SCW'(BACKUP_DEPTH)) rd_star_cnt_nx = rd_star_cnt + 1'b1;
    else                         rd_star_cnt_nx = rd_star_cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr     <= '0;
      rd_valid    <= 1'b0;
      rd_star_cnt <= '0;
    end else begin
      rd_star_cnt <= rd_star_cnt_nx;
      rd_valid    <= rd_en && !rd_start;
      if (rd_start)   rd_addr <= '0;
      else if (rd_en) rd_addr <= (rd_addr == AW'(FRAME_PIXELS - 1)) ? '0 : rd_addr + 1'b1;
    end
  end

  // output multiplexers: back-up copy on a star error, ground for background
  always_comb begin
    rd_star      = rd_valid && star;
    rd_corrected = rd_valid && star && err_in_star;
    if (!star)           rd_pixel = '0;
    else if (err_in_star) rd_pixel = bk_q;
    else                 rd_pixel = main_q.pix;
  end
endmodule

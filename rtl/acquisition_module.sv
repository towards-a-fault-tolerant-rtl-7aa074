// acquisition_module - protected 3x3 line-buffer pipeline (Error1 source).
//
// Window generation: each pushed pixel enters register R0 and FIFO Buffer 1
// at the same time. FIFO Buffer 1 feeds R3 and FIFO Buffer 2, which feeds R6.
// Each row of registers shifts right (R0->R1->R2, R3->R4->R5, R6->R7->R8),
// so after push n the window holds
//   R0..R2 = p(n), p(n-1), p(n-2)
//   R3..R5 = p(n-L), p(n-L-1), p(n-L-2)
//   R6..R8 = p(n-2L), p(n-2L-1), p(n-2L-2)
// with L = LINE_LEN, the image width. The centre R4 is p(n-L-1). Windows are
// formed on the raw stream: at the left and right image borders they wrap
// into the neighbouring row, as the plain structure does.
//
// Protection (decimated comparison): the pipeline is a delay line with two
// parallel branches, so a pixel leaving R2 leaves R5 L pushes later and R8
// 2L pushes later. A counter of period 2L, running once the pipeline holds
// only streamed pixels, loads detection register DR1 from R2 at count 0 and
// DR2 from R5 at count L; at the next count 0 a three-input comparator checks
// DR1 == DR2 == R8 and a mismatch sets error1. error1 is sticky until reset,
// since it requests a reconfiguration. check_strobe pulses with each
// comparison.
//
// Timing: win/win_valid are registered; win_valid is high in the cycle after
// each push, when win holds the new window. win_full is high once 2L+3
// pixels have been pushed since reset, i.e. every register holds a streamed
// pixel. Idle cycles (pix_valid low) freeze everything.
//
// The register/FIFO arrangement, the DR1/DR2/R8 comparison and its timing
// follow the original structure. The check period of 2L, the start condition,
// the sticky error flag and the pix_valid handshake are this design's choices.
module acquisition_module
  import star_tracker_pkg::*;
#(
  parameter int unsigned LINE_LEN = IMG_WIDTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    pix_valid,
  input  pixel_t  pix_in,
  output window_t win,
  output logic    win_valid,
  output logic    win_full,
  output logic    check_strobe,
  output logic    error1
);
  localparam int unsigned FILL  = 2 * LINE_LEN + 3;
  localparam int unsigned CW    = $clog2(2 * LINE_LEN);
  localparam int unsigned FW    = $clog2(FILL + 1);

  pixel_t fifo1_out, fifo2_out;
  pixel_t dr1, dr2;
  logic [CW-1:0] cnt;
  logic [FW-1:0] fill;
  logic          full;
  logic          armed;   // DR1 and DR2 both hold the pixel under test

  line_fifo #(.DEPTH(LINE_LEN)) u_fifo1 (
    .clk, .rst_n, .push(pix_valid), .din(pix_in),    .dout(fifo1_out));
  line_fifo #(.DEPTH(LINE_LEN)) u_fifo2 (
    .clk, .rst_n, .push(pix_valid), .din(fifo1_out), .dout(fifo2_out));

  // 3x3 window registers R0..R8
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= pix_valid;
      if (pix_valid) begin
        win[0] <= pix_in;    win[1] <= win[0]; win[2] <= win[1];
        win[3] <= fifo1_out; win[4] <= win[3]; win[5] <= win[4];
        win[6] <= fifo2_out; win[7] <= win[6]; win[8] <= win[7];
      end
    end
  end

  // Fill tracking: the check starts once no register holds a reset value or
  // an unwritten FIFO entry.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  fill <= '0;
    else if (pix_valid && !full) fill <= fill + 1'b1;
  end
  assign full     = (fill == FW'(FILL));
  assign win_full = full;

  // Decimated comparison: counter, detection registers, comparator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      dr1          <= '0;
      dr2          <= '0;
      armed        <= 1'b0;
      check_strobe <= 1'b0;
      error1       <= 1'b0;
    end else begin
      check_strobe <= 1'b0;
      if (pix_valid && full) begin
        cnt <= (cnt == CW'(2 * LINE_LEN - 1)) ? '0 : cnt + 1'b1;
        if (cnt == '0) begin
          if (armed) begin
            check_strobe <= 1'b1;
            if (dr1 != win[8] || dr2 != win[8]) error1 <= 1'b1;
          end
          dr1 <= win[2];
        end
        if (cnt == CW'(LINE_LEN)) begin
          dr2   <= win[5];
          armed <= 1'b1;
        end
      end
    end
  end
endmodule

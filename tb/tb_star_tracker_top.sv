// tb_star_tracker_top - end-to-end test of the protected pipeline on small
// 16 x 12 frames (IMG_W and IMG_H are testbench parameters) with a 64-entry
// back-up memory and threshold 40. Synthetic sky frames (background noise,
// impulsive noise, 3x3 stars) are streamed with random idle cycles; every
// stored frame is read back and compared with a reference median-plus-
// threshold model of the stream. Mechanisms exercised and counted:
//   idle cycles in the stream, back-to-back frames, impulses removed by the
//   median, thresholded pixels,
//   background upsets cleared and star upsets repaired in the image store,
//   back-up overflow, and each of error1 / error2 / error3 raised by a forced
//   fault in its module (with reset in between, standing for the
//   reconfiguration), the other two error lines staying low.
module tb_star_tracker_top #(
  parameter int IMG_W = 16,
  parameter int IMG_H = 12,
  parameter int BK    = 64,
  parameter int MAX_CYCLES = 200000
);
  import star_tracker_pkg::*;
  import star_tb_pkg::*;
  localparam int FRAME = IMG_W * IMG_H;
  localparam int SCW   = $clog2(BK + 1);
  localparam int unsigned THR = 40;

  logic   clk = 0, rst_n = 0;
  logic   pix_valid = 0, pix_sof = 0, rd_start = 0, rd_en = 0;
  pixel_t pix_in = '0, threshold = pixel_t'(THR);
  logic   rd_valid, rd_star, rd_corrected, frame_done, backup_overflow;
  pixel_t rd_pixel;
  logic [SCW-1:0] star_count;
  logic   error1, error2, error3;

  star_tracker_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .BACKUP_DEPTH(BK)) dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix_in, .threshold,
    .rd_start, .rd_en, .rd_valid, .rd_pixel, .rd_star, .rd_corrected,
    .frame_done, .star_count, .backup_overflow, .error1, .error2, .error3);

  int unsigned strm [$];
  int unsigned img [];
  int unsigned expv [];
  int checks = 0, failures = 0, cycles = 0;
  int n_idle = 0, n_frames = 0, n_thr = 0, n_bgclr = 0, n_fix = 0;
  int n_imp = 0, n_ovf = 0, n_err1 = 0, n_err2 = 0, n_err3 = 0, n_b2b = 0;
  int idle_rate = 4;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (rst_n && frame_done) n_frames++;
    if (cycles > MAX_CYCLES) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0; pix_valid = 0; pix_sof = 0; rd_en = 0; rd_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    strm.delete();
  endtask

  task automatic push_px(int unsigned p, bit sof);
    @(negedge clk);
    if (idle_rate > 0)
      while ($urandom_range(0, idle_rate - 1) == 0) begin
        pix_valid = 0; n_idle++; @(negedge clk);
      end
    pix_valid = 1; pix_sof = sof; pix_in = pixel_t'(p);
    strm.push_back(p);
    @(posedge clk); #1;
    pix_valid = 0; pix_sof = 0;
  endtask

  task automatic push_pad(int n);
    for (int i = 0; i < n; i++) push_px($urandom_range(0, 30), 0);
  endtask

  // streams one frame, returns the stream index of its first pixel
  task automatic push_frame(output int s, input int n_stars, input int bg_max);
    make_sky(img, IMG_W, IMG_H, n_stars, bg_max, 40);
    s = strm.size();
    foreach (img[i]) push_px(img[i], i == 0);
  endtask

  task automatic compute_expected(int s);
    expv = new[FRAME];
    for (int a = 0; a < FRAME; a++) begin
      expv[a] = stored(expected_pixel(strm, s, a, IMG_W, THR));
    end
  endtask

  task automatic wait_done(int target);
    for (int i = 0; i < 10 * FRAME && n_frames < target; i++) @(posedge clk);
    #1;
    check(n_frames >= target, $sformatf("frame_done count %0d, want %0d", n_frames, target));
  endtask

  // reads the stored frame and compares it with expv
  task automatic read_compare(string tag);
    int got = 0;
    @(negedge clk); rd_start = 1;
    @(negedge clk); rd_start = 0;
    for (int i = 0; got < FRAME && i < 4 * FRAME; i++) begin
      rd_en = ($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      if (rd_valid) begin
        check(rd_pixel == pixel_t'(expv[got]),
              $sformatf("%s addr %0d: read %0d, expected %0d", tag, got, rd_pixel, expv[got]));
        if (rd_corrected) n_fix++;
        got++;
      end
      @(negedge clk);
    end
    rd_en = 0;
    check(got == FRAME, $sformatf("%s: read %0d pixels", tag, got));
  endtask

  initial begin
    int s0, s1, s2;
    do_reset();

    // ---- clean frame with lead-in and trailing padding ----
    push_pad(IMG_W + 3);
    push_frame(s0, 4, 30);
    push_pad(IMG_W + 1);
    wait_done(1);
    compute_expected(s0);
    foreach (expv[a]) begin
      if (expv[a] == 0 && strm[s0 + a] >= THR) n_thr++;
      if (strm[s0 + a] == 255 && expv[a] != 255) n_imp++;
    end
    read_compare("frame0");
    check(!error1 && !error2 && !error3, "error line raised in fault-free operation");

    // ---- upsets in the main image memory ----
    for (int a = 0; a < FRAME; a += 3) begin
      int b = $urandom_range(1, 8);
      dut.u_store.u_main.mem[a] = dut.u_store.u_main.mem[a] ^ 9'(1 << b);
      if (expv[a] == 0) n_bgclr++;
      else expv[a] = expected_pixel(strm, s0, a, IMG_W, THR);  // exact back-up copy
    end
    read_compare("frame0 after upsets");
    check(n_fix > 0 && n_bgclr > 0, $sformatf("upsets: %0d repaired, %0d background", n_fix, n_bgclr));

    // ---- two frames back to back; the second one is read ----
    push_frame(s1, 3, 30);
    push_frame(s2, 5, 30);
    n_b2b++;
    push_pad(IMG_W + 1);
    wait_done(3);
    compute_expected(s2);
    read_compare("frame2");
    check(!backup_overflow, "backup_overflow with few stars");

    // ---- bright frame: more stars than back-up entries ----
    push_frame(s1, 60, 30);
    push_pad(IMG_W + 1);
    wait_done(4);
    if (backup_overflow) n_ovf++;
    check(backup_overflow && star_count == SCW'(BK), $sformatf("overflow=%b stars=%0d", backup_overflow, star_count));
    compute_expected(s1);
    read_compare("bright frame");
    check(!error1 && !error2 && !error3, "error line raised in fault-free operation");

    // ---- error1: FIFO Buffer 1 output stuck ----
    do_reset();
    push_pad(2 * IMG_W + 3);
    force dut.u_acq.fifo1_out = 8'hC3;
    push_pad(4 * IMG_W + 4);
    release dut.u_acq.fifo1_out;
    if (error1) n_err1++;
    check(error1 && !error3, $sformatf("stuck FIFO: error1=%b error3=%b", error1, error3));

    // ---- error2: median-of-middles node output stuck at 255 ----
    do_reset();
    push_pad(2 * IMG_W + 3);
    force dut.u_med.med_mid = 8'hFF;
    push_pad(IMG_W);
    release dut.u_med.med_mid;
    if (error2) n_err2++;
    check(error2 && !error1 && !error3, $sformatf("stuck median node: e1=%b e2=%b e3=%b", error1, error2, error3));

    // ---- error3: second threshold copy stuck ----
    do_reset();
    push_pad(2 * IMG_W + 3);
    force dut.u_thr.out_2 = 8'h77;
    push_pad(IMG_W);
    release dut.u_thr.out_2;
    if (error3) n_err3++;
    check(error3 && !error1 && !error2, $sformatf("stuck threshold copy: e1=%b e2=%b e3=%b", error1, error2, error3));

    // ---- every mechanism must have happened ----
    $display("impulses_removed=%0d", n_imp);
    $display("idle=%0d frames=%0d back_to_back=%0d thresholded=%0d bg_upsets=%0d star_repairs=%0d overflow=%0d err1=%0d err2=%0d err3=%0d",
             n_idle, n_frames, n_b2b, n_thr, n_bgclr, n_fix, n_ovf, n_err1, n_err2, n_err3);
    check(n_idle > 0, "no idle cycles");
    check(n_thr > 0, "no pixel removed by the threshold");
    check(n_imp > 0, "no impulse removed by the median");
    check(n_bgclr > 0, "no background upset");
    check(n_fix > 0, "no star repaired");
    check(n_ovf > 0, "no back-up overflow");
    check(n_b2b > 0, "no back-to-back frames");
    check(n_err1 > 0 && n_err2 > 0 && n_err3 > 0, "an error line never rose");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

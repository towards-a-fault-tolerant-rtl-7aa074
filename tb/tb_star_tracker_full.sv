// tb_star_tracker_full - one complete VGA frame (640 x 480) through the
// pipeline with every parameter at its default. A synthetic sky frame with
// five stars and impulsive noise is streamed after a lead-in of one line and
// followed by one line of padding; the stored frame is read back and every
// pixel compared with a reference median-plus-threshold model (threshold 40).
// Then a single-bit upset is written into every star word and every 97th
// word of the main memory and the frame is read again: background words must read 0 and star
// words must read their exact value from the back-up memory. The error lines
// must stay low throughout. frame_done is checked at its fixed latency: it is
// set by the second clock edge after the push that completes the last
// window (window register, median register, then the memory write).
module tb_star_tracker_full;
  import star_tracker_pkg::*;
  import star_tb_pkg::*;
  localparam int W = IMG_WIDTH, H = IMG_HEIGHT, FRAME = W * H;
  localparam int unsigned THR = 40;

  logic   clk = 0, rst_n = 0;
  logic   pix_valid = 0, pix_sof = 0, rd_start = 0, rd_en = 0;
  pixel_t pix_in = '0, threshold = pixel_t'(THR);
  logic   rd_valid, rd_star, rd_corrected, frame_done, backup_overflow;
  pixel_t rd_pixel;
  logic [12:0] star_count;
  logic   error1, error2, error3;

  star_tracker_top dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix_in, .threshold,
    .rd_start, .rd_en, .rd_valid, .rd_pixel, .rd_star, .rd_corrected,
    .frame_done, .star_count, .backup_overflow, .error1, .error2, .error3);

  int unsigned strm [$];
  int unsigned img [];
  int unsigned expv [];
  int checks = 0, failures = 0, cycles = 0, done_cycle = -1, n_fix = 0, n_bg = 0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (rst_n && frame_done && done_cycle < 0) done_cycle = cycles;
    if (cycles > 4 * FRAME) begin
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

  task automatic read_compare(string tag);
    int got = 0;
    @(negedge clk); rd_start = 1;
    @(negedge clk); rd_start = 0; rd_en = 1;
    while (got < FRAME) begin
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
  endtask

  initial begin
    int s, last_push;
    repeat (2) @(negedge clk);
    rst_n = 1;
    make_sky(img, W, H, 5, 30, 200);
    // stream: one line of lead-in, the frame, one line plus one of padding
    for (int i = 0; i < W + 1; i++) strm.push_back($urandom_range(0, 30));
    s = strm.size();
    foreach (img[i]) strm.push_back(img[i]);
    for (int i = 0; i < W + 1; i++) strm.push_back($urandom_range(0, 30));
    foreach (strm[i]) begin
      @(negedge clk);
      pix_valid = 1; pix_sof = (i == s); pix_in = pixel_t'(strm[i]);
    end
    @(negedge clk);
    pix_valid = 0; pix_sof = 0;
    last_push = cycles;
    repeat (5) @(posedge clk);
    #1;
    check(done_cycle == last_push + 3, $sformatf("frame_done at cycle %0d, last push at %0d", done_cycle, last_push));
    expv = new[FRAME];
    for (int a = 0; a < FRAME; a++) expv[a] = stored(expected_pixel(strm, s, a, W, THR));
    read_compare("clean");
    check(!error1 && !error2 && !error3 && !backup_overflow, "error or overflow flag in fault-free run");
    check(star_count > 0, "no star pixels stored");
    for (int a = 0; a < FRAME; a++) begin
      if (a % 97 != 0 && expv[a] == 0) continue;
      dut.u_store.u_main.mem[a] = dut.u_store.u_main.mem[a] ^ 9'(1 << $urandom_range(1, 8));
      if (expv[a] == 0) n_bg++;
      else expv[a] = expected_pixel(strm, s, a, W, THR);
    end
    read_compare("upsets");
    $display("stars stored: %0d, upsets: %0d background, %0d stars repaired", star_count, n_bg, n_fix);
    check(n_bg > 0, "no background upset");
    check(n_fix > 0 && n_fix == int'(star_count), "not every star word repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

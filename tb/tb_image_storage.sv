// tb_image_storage - protected frame store with a 48-pixel frame and a
// 16-entry back-up memory.
//  1. A frame of background (0) and star pixels is written with idle gaps
//     and read back: every pixel must come back as stored (star LSB = 1),
//     rd_valid one cycle after rd_en, star_count = number of stars.
//  2. Upsets are written straight into the main memory array: background
//     words must still read 0; stars with a flipped MSB or parity must read
//     their exact original value from the back-up copy (rd_corrected); a star
//     with a flipped LSB reads its stored value with LSB 0. A run of ten
//     adjacent star words, all upset, must be repaired back to back.
//  3. A frame with more stars than back-up entries sets backup_overflow,
//     and the next frame clears it.
module tb_image_storage;
  import star_tracker_pkg::*;
  import star_tb_pkg::*;
  localparam int unsigned FRAME = 48, BK = 16;
  localparam int unsigned AW = $clog2(FRAME), SCW = $clog2(BK + 1);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_start = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0;
  pixel_t wr_pixel = '0, rd_pixel;
  logic rd_valid, rd_star, rd_corrected, backup_overflow;
  logic [SCW-1:0] star_count;
  int unsigned img [FRAME];
  int unsigned expv [FRAME];
  logic exp_corr [FRAME];
  int checks = 0, failures = 0, cycles = 0, n_corr = 0, n_bgclr = 0;

  image_storage #(.FRAME_PIXELS(FRAME), .BACKUP_DEPTH(BK)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_pixel, .rd_start, .rd_en,
    .rd_valid, .rd_pixel, .rd_star, .rd_corrected, .star_count, .backup_overflow);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic make_frame(int stars);
    for (int i = 0; i < FRAME; i++) img[i] = 0;
    for (int s = 0; s < stars; ) begin
      int a = $urandom_range(0, FRAME - 1);
      if (img[a] == 0) begin img[a] = $urandom_range(2, 255); s++; end
    end
  endtask

  task automatic write_frame();
    for (int i = 0; i < FRAME; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin wr_en = 0; @(negedge clk); end
      wr_en = 1; wr_addr = AW'(i); wr_pixel = pixel_t'(img[i]);
    end
    @(negedge clk); wr_en = 0;
  endtask

  // reads the whole frame, comparing with expv/exp_corr
  task automatic read_frame();
    int got = 0;
    @(negedge clk); rd_start = 1;
    @(negedge clk); rd_start = 0;
    for (int i = 0; got < FRAME; i++) begin
      logic req;
      req = (i < FRAME * 2) && ($urandom_range(0, 3) != 0);
      rd_en = req;
      @(posedge clk); #1;
      // rd_valid must reflect the request of the previous cycle
      checks++;
      if (rd_valid !== req) begin
        failures++;
        $display("FAIL rd_valid=%b req=%b", rd_valid, req);
      end
      if (rd_valid) begin
        checks++;
        if (rd_pixel != pixel_t'(expv[got]) || rd_star != (img[got] != 0)
            || rd_corrected != exp_corr[got]) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d pix=%0d exp=%0d star=%b corr=%b/%b",
                                      got, rd_pixel, expv[got], rd_star, rd_corrected, exp_corr[got]);
        end
        if (rd_corrected) n_corr++;
        got++;
      end
      @(negedge clk);
      if (i > 4 * FRAME) break;
    end
    rd_en = 0;
  endtask

  initial begin
    int nstar;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. clean frame
    make_frame(10);
    write_frame();
    checks++;
    if (star_count != 10 || backup_overflow) begin
      failures++;
      $display("FAIL star_count=%0d overflow=%b", star_count, backup_overflow);
    end
    for (int i = 0; i < FRAME; i++) begin expv[i] = stored(img[i]); exp_corr[i] = 0; end
    read_frame();
    // 2. upsets in the main memory
    for (int i = 0; i < FRAME; i++) begin
      int b = $urandom_range(0, 8);
      if (i % 2 == 0) begin
        dut.u_main.mem[i] = dut.u_main.mem[i] ^ 9'(1 << b);
        if (img[i] == 0) begin expv[i] = 0; n_bgclr++; end
        else if (b == 0) expv[i] = stored(img[i]) & 8'hFE;
        else begin expv[i] = img[i]; exp_corr[i] = 1; end
      end
    end
    read_frame();
    checks++;
    if (n_corr == 0 || n_bgclr == 0) begin
      failures++;
      $display("FAIL corrections=%0d background clears=%0d", n_corr, n_bgclr);
    end
    // 2b. a run of adjacent stars, all upset: back-to-back repairs
    make_frame(0);
    for (int i = 20; i < 30; i++) img[i] = $urandom_range(2, 255);
    write_frame();
    for (int i = 0; i < FRAME; i++) begin expv[i] = stored(img[i]); exp_corr[i] = 0; end
    for (int i = 20; i < 30; i++) begin
      dut.u_main.mem[i] = dut.u_main.mem[i] ^ 9'(1 << $urandom_range(1, 8));
      expv[i] = img[i]; exp_corr[i] = 1;
    end
    read_frame();
    // 3. back-up overflow and recovery
    make_frame(BK + 4);
    write_frame();
    checks++;
    if (star_count != BK || !backup_overflow) begin
      failures++;
      $display("FAIL overflow: star_count=%0d overflow=%b", star_count, backup_overflow);
    end
    make_frame(5);
    write_frame();
    checks++;
    if (star_count != 5 || backup_overflow) begin
      failures++;
      $display("FAIL after overflow: star_count=%0d overflow=%b", star_count, backup_overflow);
    end
    for (int i = 0; i < FRAME; i++) begin expv[i] = stored(img[i]); exp_corr[i] = 0; end
    read_frame();
    $display("corrected stars: %0d, cleared background upsets: %0d", n_corr, n_bgclr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_acquisition_module - line-buffer pipeline with a short line (LINE_LEN=9).
// Random pixels are pushed with random idle cycles. After every push, once
// 2L+3 pixels are in, the nine window registers must hold the pixels the
// two-branch delay line defines (R0..R2 newest row, R3..R5 one line older,
// R6..R8 two lines older); win_full must rise exactly after 2L+3 pushes;
// comparisons must occur every 2L pushes and error1 must stay low. Then the
// output of FIFO Buffer 2 is forced to a constant (a configuration upset in
// the lower branch) and error1 must rise within two check periods.
module tb_acquisition_module;
  import star_tracker_pkg::*;
  localparam int unsigned L = 9;
  logic    clk = 0, rst_n = 0, pix_valid = 0;
  pixel_t  pix_in = '0;
  window_t win;
  logic    win_valid, win_full, check_strobe, error1;
  pixel_t  hist [$];
  int checks = 0, failures = 0, cycles = 0, strobes = 0, last_strobe = -1;

  acquisition_module #(.LINE_LEN(L)) dut (
    .clk, .rst_n, .pix_valid, .pix_in, .win, .win_valid, .win_full, .check_strobe, .error1);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int idx(int n, int k);  // pushed pixel index for register k
    int row = k / 3, col = k % 3;
    return n - row * int'(L) - col;
  endfunction

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pix_valid = ($urandom_range(0, 4) != 0);
      pix_in    = pixel_t'($urandom);
      @(posedge clk);
      if (pix_valid) hist.push_back(pix_in);
      #1;
      n = hist.size() - 1;
      // check_strobe spacing, measured in pushes
      if (check_strobe) begin
        strobes++;
        if (last_strobe >= 0) begin
          checks++;
          if (hist.size() - last_strobe != 2 * L) begin
            failures++;
            $display("FAIL strobe spacing %0d", hist.size() - last_strobe);
          end
        end
        last_strobe = hist.size();
      end
      checks++;
      if (win_full !== (hist.size() >= 2 * L + 3)) begin
        failures++;
        $display("FAIL win_full=%b after %0d pushes", win_full, hist.size());
      end
      if (pix_valid && win_valid !== 1'b1) begin
        failures++;
        $display("FAIL win_valid low after a push");
      end
      if (pix_valid && n >= 2 * int'(L) + 2) begin
        for (int k = 0; k < 9; k++) begin
          checks++;
          if (win[k] != hist[idx(n, k)]) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d R%0d=%h exp=%h", n, k, win[k], hist[idx(n, k)]);
          end
        end
      end
      if (error1) begin
        failures++;
        $display("FAIL error1 in fault-free operation");
        break;
      end
    end
    checks++;
    if (strobes < 10) begin
      failures++;
      $display("FAIL only %0d comparisons", strobes);
    end
    // configuration upset: FIFO Buffer 2 output stuck
    force dut.fifo2_out = 8'h5A;
    pix_valid = 1;
    for (int i = 0; i < 4 * L + 2 && !error1; i++) begin
      pix_in = pixel_t'($urandom_range(0, 80));
      @(posedge clk); #1;
    end
    release dut.fifo2_out;
    checks++;
    if (!error1) begin
      failures++;
      $display("FAIL error1 not raised by a stuck FIFO 2 output");
    end
    // sticky until reset
    pix_valid = 0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (!error1) begin
      failures++;
      $display("FAIL error1 not sticky");
    end
    $display("comparisons: %0d", strobes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

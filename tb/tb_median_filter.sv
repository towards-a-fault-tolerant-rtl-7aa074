// tb_median_filter - random windows (uniform, few distinct values, and
// star-like impulses) against a sorting reference: the median must be the
// 5th smallest value, the range bounds the 4th and 6th, error2 must stay low.
// Then the median-of-middles node output is forced to 255 (a configuration
// upset); every window whose resulting median leaves the range must raise
// error2, and at least some must.
module tb_median_filter;
  import star_tracker_pkg::*;
  import star_tb_pkg::*;
  window_t win;
  pixel_t  med, rhi, rlo;
  logic    err2;
  int checks = 0, failures = 0, detected = 0;

  median_filter dut (.win, .median(med), .range_hi(rhi), .range_lo(rlo), .error2(err2));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rand_win(int mode);
    for (int i = 0; i < 9; i++) begin
      case (mode)
        0: win[i] = pixel_t'($urandom);
        1: win[i] = pixel_t'($urandom_range(0, 3) * 60);
        default: win[i] = ($urandom_range(0, 5) == 0) ? 8'd255 : pixel_t'($urandom_range(10, 14));
      endcase
    end
  endtask

  initial begin
    arr9_t v, s;
    for (int n = 0; n < 30000; n++) begin
      rand_win(n % 3);
      #1;
      for (int i = 0; i < 9; i++) v[i] = win[i];
      s = sort9(v);
      checks++;
      if (med != s[4] || rhi != s[5] || rlo != s[3] || err2 !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d med=%0d/%0d hi=%0d/%0d lo=%0d/%0d err2=%b",
                                    n, med, s[4], rhi, s[5], rlo, s[3], err2);
      end
    end
    force dut.med_mid = 8'd255;
    for (int n = 0; n < 3000; n++) begin
      rand_win(n % 3);
      #1;
      checks++;
      if (err2 !== ((med > rhi) || (med < rlo))) begin
        failures++;
        if (failures < 10) $display("FAIL forced n=%0d", n);
      end
      if (err2) detected++;
    end
    release dut.med_mid;
    checks++;
    if (detected == 0) begin
      failures++;
      $display("FAIL no error2 under a forced fault");
    end
    $display("forced fault: error2 on %0d of 3000 windows", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

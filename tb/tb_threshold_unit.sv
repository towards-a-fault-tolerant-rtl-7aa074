// tb_threshold_unit - exhaustive check of the threshold: for every pixel and
// threshold value, pixels below the threshold become 0, the rest pass.
module tb_threshold_unit;
  import star_tracker_pkg::*;
  pixel_t pix, thr, out;
  int checks = 0, failures = 0;

  threshold_unit dut (.pix_in(pix), .threshold(thr), .pix_out(out));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 256; t++) begin
      for (int p = 0; p < 256; p++) begin
        pix = pixel_t'(p); thr = pixel_t'(t);
        #1;
        checks++;
        if (out != ((p < t) ? 8'd0 : 8'(p))) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d t=%0d out=%0d", p, t, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

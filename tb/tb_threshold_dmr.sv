// tb_threshold_dmr - duplicated threshold. Fault-free: every pixel and a set
// of thresholds give the thresholded pixel and error3 = 0. Then the output of
// the second copy is forced to a wrong value, as a configuration upset would
// do, and error3 must be raised whenever the two copies disagree.
module tb_threshold_dmr;
  import star_tracker_pkg::*;
  pixel_t pix, thr, out;
  logic   err3;
  int checks = 0, failures = 0, detected = 0;

  threshold_dmr dut (.pix_in(pix), .threshold(thr), .pix_out(out), .error3(err3));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 256; t += 5) begin
      for (int p = 0; p < 256; p++) begin
        pix = pixel_t'(p); thr = pixel_t'(t);
        #1;
        checks++;
        if (out != ((p < t) ? 8'd0 : 8'(p)) || err3 !== 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d t=%0d out=%0d err3=%b", p, t, out, err3);
        end
      end
    end
    // upset in copy 2: its output stuck at 0x40
    force dut.out_2 = 8'h40;
    thr = 8'd20;
    for (int p = 0; p < 256; p++) begin
      pix = pixel_t'(p);
      #1;
      checks++;
      if (err3 !== (((p < 20) ? 8'd0 : 8'(p)) != 8'h40)) begin
        failures++;
        if (failures < 10) $display("FAIL forced p=%0d err3=%b", p, err3);
      end
      if (err3) detected++;
    end
    release dut.out_2;
    checks++;
    if (detected != 255) begin
      failures++;
      $display("FAIL detected=%0d", detected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

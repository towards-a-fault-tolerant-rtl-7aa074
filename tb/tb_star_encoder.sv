// tb_star_encoder - exhaustive check of the star/background encoding: zero
// gives the all-zero word; any other pixel keeps its seven MSBs, gets LSB 1 and
// an even-parity bit over the seven MSBs. Also checks the minimum distance of
// three between every star word (seven MSBs not all zero) and background.
module tb_star_encoder;
  import star_tracker_pkg::*;
  pixel_t       pix;
  coded_pixel_t code;
  logic         is_star;
  int checks = 0, failures = 0;

  star_encoder dut (.pix, .code, .is_star);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      logic [8:0] exp_w;
      int par;
      pix = pixel_t'(p);
      #1;
      par = 0;
      for (int i = 1; i < 8; i++) par ^= (p >> i) & 1;
      exp_w = (p == 0) ? 9'd0 : {1'(par), 8'(p | 1)};
      checks++;
      if ({code.parity, code.pix} != exp_w || is_star != (p != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d code=%h", p, code);
      end
      if (p >= 2) begin
        checks++;
        if ($countones({code.parity, code.pix}) < 3) begin
          failures++;
          $display("FAIL distance p=%0d", p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

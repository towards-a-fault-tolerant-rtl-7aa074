// tb_pixel_check - every encoded word (background and every star value whose
// seven MSBs are not all zero) is presented unchanged and with each of its
// nine bits flipped. Expected: background stays background; a star stays a
// star; error_in_star is set exactly when a MSB or the parity bit flipped.
module tb_pixel_check;
  import star_tracker_pkg::*;
  coded_pixel_t code;
  logic         star, err;
  int checks = 0, failures = 0;

  pixel_check dut (.code, .star, .error_in_star(err));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      logic [8:0] w;
      int par;
      if (p == 1) continue;
      par = 0;
      for (int i = 1; i < 8; i++) par ^= (p >> i) & 1;
      w = (p == 0) ? 9'd0 : {1'(par), 8'(p | 1)};
      for (int f = -1; f < 9; f++) begin
        logic exp_star, exp_err;
        code = (f < 0) ? w : (w ^ (9'd1 << f));
        #1;
        exp_star = (p != 0);
        exp_err  = (p != 0) && (f >= 1);
        checks++;
        if (star != exp_star || err != exp_err) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d flip=%0d star=%b err=%b", p, f, star, err);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// threshold_dmr - threshold module protected by duplication with comparison.
//
// Two identical threshold units process the same median pixel; the output of
// the first is the thresholded pixel, and an inequality comparator on both
// outputs raises error3 whenever they differ (a configuration upset in one
// copy). Purely combinational; error3 is meaningful whenever pix_in is.
// On an FPGA the two copies must be kept apart by the implementation flow
// (no sharing of equivalent logic), otherwise the duplication is optimised
// away; the RTL simply instantiates the unit twice.
module threshold_dmr
  import star_tracker_pkg::*;
(
  input  pixel_t pix_in,
  input  pixel_t threshold,
  output pixel_t pix_out,
  output logic   error3
);
  pixel_t out_1, out_2;

  threshold_unit u_thr1 (.pix_in(pix_in), .threshold(threshold), .pix_out(out_1));
  threshold_unit u_thr2 (.pix_in(pix_in), .threshold(threshold), .pix_out(out_2));

  always_comb begin
    pix_out = out_1;
    error3  = (out_1 != out_2);
  end
endmodule

// median_filter - protected 3x3 median filter (Error2 source).
//
// Median network: 19 identical exchange nodes (exchange_node) find the median
// of the nine window pixels without a full sort:
//   * nodes 1-9   sort each row of three pixels into lo <= mid <= hi;
//   * nodes 10-11 take the maximum of the three row minima;
//   * nodes 12-13 take the minimum of the three row maxima;
//   * nodes 14-16 take the median of the three row middles;
//   * nodes 17-19 take the median of those three results. The lower output
//     of the last node is the median of the nine pixels.
// (This numbering is the module's own.)
//
// Protection: eight node outputs are left unused by the network. Four of them
// are provably >= the median (the discarded maxima of nodes 12, 13, 16, 19)
// and four are provably <= it (the discarded minima of nodes 10, 11, 15, 18).
// Six extra exchange nodes reduce them to a dynamic range: H1-H3 take the
// lowest of the four high values (upper bound, H3 low output) and L1-L3 the
// highest of the four low values (lower bound, L3 high output). In a correct
// circuit these are the 6th and 4th smallest of the nine pixels. Two
// comparators raise error2 when the median lies above the upper bound or
// below the lower bound.
//
// Purely combinational: median and error2 follow the window in the same
// cycle; the caller registers them.
module median_filter
  import star_tracker_pkg::*;
(
  input  window_t win,
  output pixel_t  median,
  output pixel_t  range_hi,
  output pixel_t  range_lo,
  output logic    error2
);
  // per-row sort (rows: win[0..2], win[3..5], win[6..8])
  pixel_t r_h1 [3], r_l1 [3], r_l2 [3];
  pixel_t lo [3], mid [3], hi [3];

  for (genvar r = 0; r < 3; r++) begin : g_row
    exchange_node #(.W(PIX_W)) u_n1 (.a(win[3*r]),   .b(win[3*r+1]), .h(r_h1[r]), .l(r_l1[r]));
    exchange_node #(.W(PIX_W)) u_n2 (.a(r_h1[r]),    .b(win[3*r+2]), .h(hi[r]),   .l(r_l2[r]));
    exchange_node #(.W(PIX_W)) u_n3 (.a(r_l1[r]),    .b(r_l2[r]),    .h(mid[r]),  .l(lo[r]));
  end

  // maximum of the row minima
  pixel_t mx_h1, max_lo, low_a, low_b;
  exchange_node #(.W(PIX_W)) u_n10 (.a(lo[0]), .b(lo[1]), .h(mx_h1),  .l(low_a));
  exchange_node #(.W(PIX_W)) u_n11 (.a(mx_h1), .b(lo[2]), .h(max_lo), .l(low_b));

  // minimum of the row maxima
  pixel_t mn_l1, min_hi, high_a, high_b;
  exchange_node #(.W(PIX_W)) u_n12 (.a(hi[0]), .b(hi[1]), .h(high_a), .l(mn_l1));
  exchange_node #(.W(PIX_W)) u_n13 (.a(mn_l1), .b(hi[2]), .h(high_b), .l(min_hi));

  // median of the row middles
  pixel_t md_h1, md_l1, md_h2, med_mid, low_c, high_c;
  exchange_node #(.W(PIX_W)) u_n14 (.a(mid[0]), .b(mid[1]), .h(md_h1),  .l(md_l1));
  exchange_node #(.W(PIX_W)) u_n15 (.a(md_l1),  .b(mid[2]), .h(md_h2),  .l(low_c));
  exchange_node #(.W(PIX_W)) u_n16 (.a(md_h1),  .b(md_h2),  .h(high_c), .l(med_mid));

  // median of (max_lo, med_mid, min_hi)
  pixel_t f_h1, f_l1, f_h2, low_d, high_d;
  exchange_node #(.W(PIX_W)) u_n17 (.a(max_lo), .b(med_mid), .h(f_h1),   .l(f_l1));
  exchange_node #(.W(PIX_W)) u_n18 (.a(f_l1),   .b(min_hi),  .h(f_h2),   .l(low_d));
  exchange_node #(.W(PIX_W)) u_n19 (.a(f_h1),   .b(f_h2),    .h(high_d), .l(median));

  // range nodes built from the unused outputs
  pixel_t rh1_h, rh1_l, rh2_h, rh2_l, rh3_h;
  exchange_node #(.W(PIX_W)) u_h1 (.a(high_a), .b(high_b), .h(rh1_h), .l(rh1_l));
  exchange_node #(.W(PIX_W)) u_h2 (.a(rh1_l),  .b(high_c), .h(rh2_h), .l(rh2_l));
  exchange_node #(.W(PIX_W)) u_h3 (.a(rh2_l),  .b(high_d), .h(rh3_h), .l(range_hi));

  pixel_t rl1_h, rl1_l, rl2_h, rl2_l, rl3_l;
  exchange_node #(.W(PIX_W)) u_l1 (.a(low_a), .b(low_b), .h(rl1_h),    .l(rl1_l));
  exchange_node #(.W(PIX_W)) u_l2 (.a(rl1_h), .b(low_c), .h(rl2_h),    .l(rl2_l));
  exchange_node #(.W(PIX_W)) u_l3 (.a(rl2_h), .b(low_d), .h(range_lo), .l(rl3_l));

  // range comparators
  always_comb error2 = (median > range_hi) || (median < range_lo);
endmodule

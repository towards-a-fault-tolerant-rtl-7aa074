// star_tb_pkg - reference functions shared by the testbenches: sorting of a
// 3x3 window, the threshold and the stored (encoded) form of a pixel.
package star_tb_pkg;
  typedef int unsigned arr9_t [9];

  function automatic arr9_t sort9(arr9_t v);
    arr9_t s = v;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (s[j] > s[j+1]) begin
          int unsigned t = s[j]; s[j] = s[j+1]; s[j+1] = t;
        end
    return s;
  endfunction

  function automatic int unsigned thresh(int unsigned p, int unsigned t);
    return (p < t) ? 0 : p;
  endfunction

  // value read back from the image store for a pixel written as p
  function automatic int unsigned stored(int unsigned p);
    return (p == 0) ? 0 : (p | 1);
  endfunction
  // Synthetic sky frame of w x h pixels, row by row: dark background noise
  // (0..bg_max), isolated impulsive-noise pixels at 255 with probability
  // 1/imp_rate, and n_stars stars drawn as 3x3 blobs (peak 150..250 in the
  // centre, 60 less on the edges, 100 less in the corners).
  function automatic void make_sky(ref int unsigned img [], input int w, input int h,
                                   input int n_stars, input int bg_max, input int imp_rate);
    img = new[w * h];
    foreach (img[i]) begin
      img[i] = $urandom_range(0, bg_max);
      if ($urandom_range(0, imp_rate - 1) == 0) img[i] = 255;
    end
    for (int s = 0; s < n_stars; s++) begin
      int cx = $urandom_range(1, w - 2), cy = $urandom_range(1, h - 2);
      int peak = $urandom_range(150, 250);
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++)
          img[(cy + dy) * w + cx + dx] = peak - ((dx != 0 && dy != 0) ? 100 : (dx != 0 || dy != 0) ? 60 : 0);
    end
  endfunction

  // Expected stored value of frame pixel a when the frame's first pixel is
  // stream index s: the median of the 3x3 window the line buffer forms around
  // stream index s+a (rows w apart, wrapping at row ends), then the threshold.
  function automatic int unsigned expected_pixel(ref int unsigned strm [$], input int s,
                                                 input int a, input int w, input int unsigned t);
    arr9_t v;
    int n = s + a + w + 1;     // index of the newest pixel of that window
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        v[3 * r + c] = strm[n - r * w - c];
    return thresh(sort9(v)[4], t);
  endfunction
endpackage

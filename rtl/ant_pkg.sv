// Shared constants and the threshold computation of the ANT (algorithmic
// noise tolerant) multiplier.
//
// ANT_N is the operand width of the main multiplier; the reduced-precision
// replica works on the N/2 most significant bits of each operand and
// produces N/2 result bits of weight 2^(3N/2) and up.
//
// ant_threshold(N) returns the decision threshold
//   Th = max over all x, y of | x*y - yr(x,y) * 2^(3N/2) |,
// the largest distance between an error-free product and the compensated
// replica, so that a correct product is never replaced. For fixed upper
// halves the replica value is fixed and x*y grows with both lower halves,
// so only the four corners (lower halves all-0 or all-1) need evaluating.
// rpr_model is a bit-level model of the replica used for that; it is
// evaluated at elaboration only. For N = 12 the threshold is 455553.
package ant_pkg;
  localparam int unsigned ANT_N = 12;

  // Replica output for upper halves xh, yh (H = N/2 bits each): kept
  // partial products (i+j >= H) plus beta, X(N/2)Y(N-1) and the
  // conditional unit Cm = (beta == 0) & (beta_l > 0).
  function automatic longint unsigned rpr_model(int unsigned n, longint unsigned xh,
                                                longint unsigned yh);
    int unsigned h = n / 2;
    longint unsigned kept = 0, beta = 0, beta_l = 0, c_last;
    for (int unsigned i = 0; i < h; i++)
      for (int unsigned j = 0; j < h; j++)
        if (i + j >= h) kept += ((xh >> i) & (yh >> j) & 1) << (i + j - h);
    for (int unsigned i = 1; i < h; i++)     beta   += (xh >> i) & (yh >> (h - 1 - i)) & 1;
    for (int unsigned i = 0; i + 1 < h; i++) beta_l += (xh >> i) & (yh >> (h - 2 - i)) & 1;
    c_last = (xh & (yh >> (h - 1)) & 1) | longint'(beta == 0 && beta_l != 0);
    return kept + beta + c_last;
  endfunction

  function automatic longint unsigned ant_threshold(int unsigned n);
    int unsigned h = n / 2;
    longint unsigned th = 0, lo = (64'd1 << h) - 1;
    longint signed d;
    for (longint unsigned a = 0; a < (64'd1 << h); a++)
      for (longint unsigned b = 0; b < (64'd1 << h); b++) begin
        longint unsigned est = rpr_model(n, a, b) << (3 * h);
        for (int cx = 0; cx < 2; cx++)
          for (int cy = 0; cy < 2; cy++) begin
            d = longint'(((a << h) | (cx != 0 ? lo : 0)) * ((b << h) | (cy != 0 ? lo : 0)))
                - longint'(est);
            if (d < 0) d = -d;
            if ($unsigned(d) > th) th = $unsigned(d);
          end
      end
    return th;
  endfunction

  localparam longint unsigned ANT_TH = ant_threshold(ANT_N);
endpackage

// Shared constants and elaboration-time helpers for the reliable Wallace multiplier.
//
// The multiplier pairs an exact N x N Wallace main block with a reduced-precision
// replica (RPR) that multiplies only the N/2 most significant bits of each operand.
// The error-correction stage trusts the main block as long as it stays within a
// threshold Th of the replica; Th is the largest distance an error-free product can
// have from the replica, Th = max over all inputs of |yo - yr|.
//
// rpr_model() restates the replica arithmetic (fixed-width product with ICV/MICV
// compensation) so that compute_th() can derive Th at elaboration time instead of
// storing it as a hand-computed number. Only the N/2-bit operand MSBs matter for the
// replica, so for each pair of MSB values the distance is largest at one of the two
// ends of the range of exact products, which keeps the search to 2^N pairs.
// Widths up to N = 30 fit the 64-bit arithmetic used here.
package mul_pkg;

  // Operand width of the main block (12 x 12 multiplier).
  parameter int unsigned N_DEF = 12;

  // Fixed-width replica result for H-bit operands xh, yh: the partial products
  // of weight >= 2^H, plus beta units of 2^H (beta = set terms of weight 2^(H-1)),
  // plus one more unit of 2^H when beta = 0 and some term of weight 2^(H-2) is set,
  // kept from weight 2^H up.
  function automatic longint unsigned rpr_model(int unsigned h,
                                                longint unsigned xh,
                                                longint unsigned yh);
    longint unsigned acc;
    int unsigned     beta;
    int unsigned     alpha;
    acc   = 0;
    beta  = 0;
    alpha = 0;
    for (int unsigned i = 0; i < h; i++) begin
      for (int unsigned j = 0; j < h; j++) begin
        if (xh[i] && yh[j]) begin
          if (i + j >= h)          acc += longint'(1) << (i + j);
          else if (i + j == h - 1) beta++;
          else if (i + j == h - 2) alpha++;
        end
      end
    end
    acc += longint'(beta) << h;
    if (beta == 0 && alpha != 0) acc += longint'(1) << h;
    return acc >> h;
  endfunction

  // Th = max |yo - yr| over every input pair of an n x n multiplier whose
  // replica works on the n/2 MSBs.
  function automatic longint unsigned compute_th(int unsigned n);
    int unsigned     h;
    int unsigned     lo_bits;
    longint unsigned th;
    longint unsigned r;
    longint unsigned lo;
    longint unsigned hi;
    longint unsigned fill;
    h       = n / 2;
    lo_bits = n - h;
    fill    = (longint'(1) << lo_bits) - 1;
    th      = 0;
    for (longint unsigned xh = 0; xh < (longint'(1) << h); xh++) begin
      for (longint unsigned yh = 0; yh < (longint'(1) << h); yh++) begin
        r  = rpr_model(h, xh, yh) << (h + 2 * lo_bits);
        lo = (xh << lo_bits) * (yh << lo_bits);
        hi = ((xh << lo_bits) + fill) * ((yh << lo_bits) + fill);
        if (r > lo && r - lo > th) th = r - lo;
        if (lo >= r && lo - r > th) th = lo - r;
        if (r > hi && r - hi > th) th = r - hi;
        if (hi >= r && hi - r > th) th = hi - r;
      end
    end
    return th;
  endfunction

endpackage

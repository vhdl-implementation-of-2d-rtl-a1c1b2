// tb_dwt_ref_pkg: reference model of the fixed-point (9,7) lifting transform,
// written independently of the RTL for the testbenches. lift1d transforms a
// vector in place (interleaved low/high); dwt2d applies J levels of row-then-
// column lifting to an N x N image stored row-major, in the in-place layout
// (level j works on the samples whose row and column are multiples of 2^j).
package tb_dwt_ref_pkg;

  function automatic int wrap16(input longint v);
    return int'(shortint'(v));
  endfunction

  function automatic int coef_of(input int s);
    case (s)
      0: return -6497;
      1: return -217;
      2: return 3616;
      default: return 1817;
    endcase
  endfunction

  // mirror index into 0..len-1 (whole-sample symmetric extension)
  function automatic int mirror(input int i, input int len);
    if (i < 0) return -i;
    if (i >= len) return 2 * len - 2 - i;
    return i;
  endfunction

  function automatic void lift1d(ref int x[], input int len);
    longint t;
    for (int s = 0; s < 4; s++) begin
      for (int n = (s % 2 == 0) ? 1 : 0; n < len; n += 2) begin
        t = longint'(x[mirror(n - 1, len)] + x[mirror(n + 1, len)]) * coef_of(s) + 2048;
        x[n] = wrap16(x[n] + (t >>> 12));
      end
    end
    for (int n = 0; n < len; n++) begin
      t = longint'(x[n]) * ((n % 2) ? 5039 : 3330) + 2048;
      x[n] = wrap16(t >>> 12);
    end
  endfunction

  function automatic void dwt2d(ref int img[], input int n, input int levels);
    for (int j = 0; j < levels; j++) begin
      int w;
      int v[];
      w = n >> j;
      v = new[w];
      for (int r = 0; r < w; r++) begin
        for (int c = 0; c < w; c++) v[c] = img[(r << j) * n + (c << j)];
        lift1d(v, w);
        for (int c = 0; c < w; c++) img[(r << j) * n + (c << j)] = v[c];
      end
      for (int c = 0; c < w; c++) begin
        for (int r = 0; r < w; r++) v[r] = img[(r << j) * n + (c << j)];
        lift1d(v, w);
        for (int r = 0; r < w; r++) img[(r << j) * n + (c << j)] = v[r];
      end
    end
  endfunction

endpackage

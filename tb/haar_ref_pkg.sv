// haar_ref_pkg: reference model for the testbenches. It computes each
// coefficient of the relaxed 16-point Haar transform straight from its
// definition, without any butterfly: coefficient m (m >= 1) lies on level
// j = floor(log2 m), covers L = 16 >> j samples starting at (m - 2**j) * L,
// and equals (sum of its first half) - (sum of its second half). Coefficient 0
// is the sum of all samples. Every value is then divided by 16, rounding
// toward minus infinity, and kept to 8 bits.
package haar_ref_pkg;

  function automatic int floor_div(int c, int d);
    if (c >= 0) return c / d;
    return -((-c + d - 1) / d);
  endfunction

  // unscaled coefficient m of the 16 samples s
  function automatic int haar_raw(int s[16], int m);
    int j, L, start, acc;
    acc = 0;
    if (m == 0) begin
      for (int i = 0; i < 16; i++) acc += s[i];
      return acc;
    end
    j = 0;
    while ((2 << j) <= m) j++;
    L = 16 >> j;
    start = (m - (1 << j)) * L;
    for (int i = 0; i < L; i++)
      acc += (i < L/2) ? s[start+i] : -s[start+i];
    return acc;
  endfunction

  // scaled 8-bit coefficient m as the hardware should produce it
  function automatic logic [7:0] haar_coef(int s[16], int m);
    int v;
    v = floor_div(haar_raw(s, m), 16);
    return v[7:0];
  endfunction

endpackage

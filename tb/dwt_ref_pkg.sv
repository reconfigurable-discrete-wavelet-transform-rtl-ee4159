// dwt_ref_pkg: reference models used by the testbenches.
//
// lift_line() computes the 1-D forward lifting transform of one line straight
// from the lifting equations of each filter, on arrays, with the samples
// outside the line taken as zero. It shares only the rounding rule with the
// hardware (a coefficient product is rounded to nearest, ties up, and the
// sum saturated to 16 bits); it does not use the PE context encoding.
package dwt_ref_pkg;
  import rdwt_pkg::*;

  localparam int XMAX = 1024;   // longest line, samples
  localparam int PAD  = 8;      // index margin on each side

  typedef int line_t [XMAX];

  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // a + round(k * s / 4096)
  function automatic int lift(int a, int k, int s);
    longint p;
    p = (longint'(k) * longint'(s) + 2048) >>> 12;
    return sat(longint'(a) + p);
  endfunction

  // one value of an extended array: index n in [-PAD, n2+PAD)
  typedef int ext_t [-PAD:XMAX/2+PAD-1];

  function automatic int at(ref ext_t a, input int n, input int n2);
    if (n < -PAD || n >= n2 + PAD) return 0;
    return a[n];
  endfunction

  // x: n samples (n even). l, h: n/2 coefficients each.
  function automatic void lift_line(int filt, ref line_t x, input int n,
                                    ref line_t l, ref line_t h);
    ext_t e, o, s1, d1, s2, d2;
    int n2;
    n2 = n / 2;
    for (int i = -PAD; i < XMAX/2 + PAD; i++) begin
      e[i] = 0; o[i] = 0; s1[i] = 0; d1[i] = 0; s2[i] = 0; d2[i] = 0;
    end
    for (int i = 0; i < n2; i++) begin
      e[i] = x[2*i];
      o[i] = x[2*i+1];
    end
    case (filt)
      F_53: begin
        for (int i = -PAD; i < n2+PAD; i++) d1[i] = lift(o[i], -2048, at(e,i,n2) + at(e,i+1,n2));
        for (int i = -PAD; i < n2+PAD; i++) s1[i] = lift(e[i],  1024, at(d1,i-1,n2) + at(d1,i,n2));
        for (int i = 0; i < n2; i++) begin l[i] = s1[i]; h[i] = d1[i]; end
      end
      F_97: begin
        for (int i = -PAD; i < n2+PAD; i++) d1[i] = lift(o[i],  -6497, at(e,i,n2)  + at(e,i+1,n2));
        for (int i = -PAD; i < n2+PAD; i++) s1[i] = lift(e[i],   -217, at(d1,i-1,n2) + at(d1,i,n2));
        for (int i = -PAD; i < n2+PAD; i++) d2[i] = lift(d1[i],  3616, at(s1,i,n2) + at(s1,i+1,n2));
        for (int i = -PAD; i < n2+PAD; i++) s2[i] = lift(s1[i],  1817, at(d2,i-1,n2) + at(d2,i,n2));
        for (int i = 0; i < n2; i++) begin
          l[i] = lift(0, 4709, s2[i]);
          h[i] = lift(0, 3563, d2[i]);
        end
      end
      F_93: begin
        for (int i = -PAD; i < n2+PAD; i++) d1[i] = lift(o[i], -2048, at(e,i,n2) + at(e,i+1,n2));
        for (int i = -PAD; i < n2+PAD; i++) s1[i] = lift(e[i],  1216, at(d1,i-1,n2) + at(d1,i,n2));
        for (int i = -PAD; i < n2+PAD; i++) s2[i] = lift(s1[i], -192, at(d1,i-2,n2) + at(d1,i+1,n2));
        for (int i = 0; i < n2; i++) begin l[i] = s2[i]; h[i] = d1[i]; end
      end
      F_210: begin
        for (int i = -PAD; i < n2+PAD; i++) d1[i] = lift(o[i], -4096, e[i]);
        for (int i = -PAD; i < n2+PAD; i++) s1[i] = lift(e[i],  2048, d1[i]);
        for (int i = -PAD; i < n2+PAD; i++) d2[i] = lift(d1[i], 1408, at(s1,i-1,n2) - at(s1,i+1,n2));
        for (int i = -PAD; i < n2+PAD; i++) d1[i] = lift(d2[i], -192, at(s1,i-2,n2) - at(s1,i+2,n2));
        for (int i = 0; i < n2; i++) begin l[i] = s1[i]; h[i] = d1[i]; end
      end
      F_137: begin
        for (int i = -PAD; i < n2+PAD; i++) d1[i] = lift(o[i], -2304, at(e,i,n2) + at(e,i+1,n2));
        for (int i = -PAD; i < n2+PAD; i++) d2[i] = lift(d1[i], 256, at(e,i-1,n2) + at(e,i+2,n2));
        for (int i = -PAD; i < n2+PAD; i++) s1[i] = lift(e[i],  1152, at(d2,i-1,n2) + at(d2,i,n2));
        for (int i = -PAD; i < n2+PAD; i++) s2[i] = lift(s1[i], -128, at(d2,i-2,n2) + at(d2,i+1,n2));
        for (int i = 0; i < n2; i++) begin l[i] = s2[i]; h[i] = d2[i]; end
      end
      default: ;
    endcase
  endfunction
endpackage

// subpel_ref_pkg: reference model of the interpolation arithmetic for the
// testbenches, written directly from the formulas (not from the RTL).
// Reference area samples are addressed by block coordinates (-1 .. W+1).
package subpel_ref_pkg;

  localparam int MAXA = 19;           // up to a 16x16 block plus 3

  typedef int area_t [MAXA][MAXA];    // [row+1][col+1]

  function automatic int clip8(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // (c0*p0 + c1*p1 + c2*p2 + c3*p3 + 2^(n-1)) / 2^n, floor, clipped
  function automatic int fir_ref(int c0, int c1, int c2, int c3,
                                 int p0, int p1, int p2, int p3, int n);
    int s;
    s = c0*p0 + c1*p1 + c2*p2 + c3*p3 + (1 << (n-1));
    return clip8(s >>> n);
  endfunction

  function automatic int g(const ref area_t a, input int r, int c);
    return a[r+1][c+1];
  endfunction

  // half pel right of (r,c)
  function automatic int b_ref(const ref area_t a, input int r, int c, int cf[4], int n);
    return fir_ref(cf[0], cf[1], cf[2], cf[3],
                   g(a,r,c-1), g(a,r,c), g(a,r,c+1), g(a,r,c+2), n);
  endfunction

  // half pel below (r,c); vertical taps are the horizontal ones mirrored
  function automatic int h_ref(const ref area_t a, input int r, int c, int cf[4], int n);
    return fir_ref(cf[3], cf[2], cf[1], cf[0],
                   g(a,r-1,c), g(a,r,c), g(a,r+1,c), g(a,r+2,c), n);
  endfunction

  // centre half pel, horizontal filter over the vertical half pels
  function automatic int j_ref(const ref area_t a, input int r, int c, int cf[4], int n);
    return fir_ref(cf[0], cf[1], cf[2], cf[3],
                   h_ref(a,r,c-1,cf,n), h_ref(a,r,c,cf,n),
                   h_ref(a,r,c+1,cf,n), h_ref(a,r,c+2,cf,n), n);
  endfunction

  function automatic int avg(int x, int y);
    return (x + y + 1) >> 1;
  endfunction

  // sample at (r + y/4, c + x/4)
  function automatic int qpel_ref(const ref area_t a, input int r, int c,
                                  int x, int y, int cf[4], int n);
    int D, E, H, I, bb, hh, jj, mm, ss;
    D  = g(a, r, c);
    E  = g(a, r, c+1);
    H  = g(a, r+1, c);
    I  = g(a, r+1, c+1);
    bb = b_ref(a, r, c, cf, n);
    hh = h_ref(a, r, c, cf, n);
    jj = j_ref(a, r, c, cf, n);
    mm = h_ref(a, r, c+1, cf, n);
    ss = b_ref(a, r+1, c, cf, n);
    case (y*4 + x)
      0:  return D;
      1:  return avg(D, bb);      // a
      2:  return bb;              // b
      3:  return avg(bb, E);      // c
      4:  return avg(D, hh);      // d
      5:  return avg(D, jj);      // e
      6:  return avg(bb, jj);     // f
      7:  return avg(E, jj);      // g
      8:  return hh;              // h
      9:  return avg(hh, jj);     // i
      10: return jj;              // j
      11: return avg(jj, mm);     // k
      12: return avg(hh, H);      // n
      13: return avg(H, jj);      // p
      14: return avg(jj, ss);     // q
      default: return avg(I, jj); // r
    endcase
  endfunction

endpackage

// tb_fp_pkg: reference conversions between real numbers and the design's
// floating point words, for the testbenches. The format is given at run
// time (exponent width ew, mantissa width mw); words are held in 64 bits.
// real_to_fp rounds to nearest, ties to even, flushes values below the
// smallest normal to zero and saturates above the largest finite value,
// matching the number system of the hardware.
package tb_fp_pkg;

  function automatic real fp_to_real(logic [63:0] w, int ew, int mw);
    int  e;
    real m;
    e = int'((w >> mw) & ((64'd1 << ew) - 1));
    if (e == 0) return 0.0;
    m = 1.0 + real'(w & ((64'd1 << mw) - 1)) / (2.0 ** mw);
    m = m * (2.0 ** (e - ((1 << (ew - 1)) - 1)));
    return w[ew+mw] ? -m : m;
  endfunction

  function automatic logic [63:0] real_to_fp(real r, int ew, int mw);
    logic       s;
    real        m, f, fl;
    int         e, bias, emax;
    longint     fi;
    s    = (r < 0.0);
    m    = s ? -r : r;
    bias = (1 << (ew - 1)) - 1;
    emax = (1 << ew) - 2;
    if (m == 0.0) return 64'(s) << (ew + mw);
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    f  = (m - 1.0) * (2.0 ** mw);
    fl = $floor(f);
    fi = longint'(fl);
    if ((f - fl) > 0.5 || ((f - fl) == 0.5 && fi[0])) fi++;
    if (fi == (longint'(1) << mw)) begin fi = 0; e++; end
    e = e + bias;
    if (e <= 0) return 64'(s) << (ew + mw);
    if (e > emax) return (64'(s) << (ew + mw)) | (64'(emax) << mw) | ((64'd1 << mw) - 1);
    return (64'(s) << (ew + mw)) | (64'(e) << mw) | 64'(fi);
  endfunction

  // distance in units in the last place between two words of equal sign
  function automatic longint ulp_dist(logic [63:0] x, logic [63:0] y, int ew, int mw);
    longint mx, my;
    mx = longint'(x & ((64'd1 << (ew + mw)) - 1));
    my = longint'(y & ((64'd1 << (ew + mw)) - 1));
    if (x[ew+mw] != y[ew+mw]) return mx + my;
    return (mx > my) ? mx - my : my - mx;
  endfunction

endpackage

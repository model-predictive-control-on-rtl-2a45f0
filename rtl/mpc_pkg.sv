// mpc_pkg: types and constants shared by the MPC-on-a-chip modules.
//
// The floating point word is {sign, exponent, mantissa} in the IEEE-754
// layout. The default widths (8-bit exponent, 23-bit mantissa) are IEEE
// single precision, the main format of the design; the reduced (9,18)
// format is selected by overriding EXP_W/MAN_W on the modules. The
// arithmetic library keeps only normal numbers: subnormals flush to zero
// and there is no infinity or NaN (overflow saturates to the largest
// finite value) -- a simplification chosen for this design.
package mpc_pkg;

  // Default floating point format: IEEE single precision.
  localparam int unsigned FP_EXP_W = 8;
  localparam int unsigned FP_MAN_W = 23;

  // Operations of the floating point unit.
  typedef enum logic [2:0] {
    FP_ADD  = 3'd0,  // y = a + b
    FP_SUB  = 3'd1,  // y = a - b
    FP_MUL  = 3'd2,  // y = a * b
    FP_DIV  = 3'd3,  // y = a / b
    FP_MAC  = 3'd4,  // y = c + a * b   (product rounded, then sum rounded)
    FP_NMAC = 3'd5   // y = c - a * b
  } fp_op_e;

  // Address spaces of the solver's problem memories, as seen by the loader.
  typedef enum logic [1:0] {
    SEL_Q = 2'd0,   // Hessian Q, row-major, n x n
    SEL_C = 2'd1,   // linear cost c, n
    SEL_J = 2'd2,   // constraint matrix J, row-major, mc x n
    SEL_G = 2'd3    // constraint bound g, mc
  } mem_sel_e;

  // Elaboration-time conversion of a real constant to a floating point word
  // of exponent width ew and mantissa width mw (round to nearest, ties to
  // even); used for the solver's algorithm constants. Returns the word in
  // the low ew+mw+1 bits.
  function automatic logic [63:0] const_to_fp(real r, int ew, int mw);
    logic   s;
    real    m, f, fl;
    int     e;
    longint fi;
    s = (r < 0.0);
    m = s ? -r : r;
    if (m == 0.0) return 64'(s) << (ew + mw);
    e = 0;
    for (int k = 0; k < 4096 && m >= 2.0; k++) begin m = m / 2.0; e++; end
    for (int k = 0; k < 4096 && m < 1.0; k++)  begin m = m * 2.0; e--; end
    f  = (m - 1.0) * real'(longint'(1) << mw);
    fl = $floor(f);
    fi = longint'(fl);
    if ((f - fl) > 0.5 || ((f - fl) == 0.5 && fi[0])) fi++;
    if (fi == (longint'(1) << mw)) begin fi = 0; e++; end
    e = e + (1 << (ew - 1)) - 1;
    return (64'(s) << (ew + mw)) | (64'(e) << mw) | 64'(fi);
  endfunction

endpackage

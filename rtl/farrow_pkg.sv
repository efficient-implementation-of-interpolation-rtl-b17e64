// farrow_pkg: constants and types shared by the cubic Farrow interpolator.
//
// The interpolator computes y(m + mu) from the four samples x(m-1) .. x(m+2)
// with cubic Lagrange weights. Number formats used throughout:
//   * samples x      : signed integers of X_W bits (any fixed scale; the
//                      output keeps the same scale),
//   * fractional mu  : unsigned fraction of MU_W bits, mu = code / 2**MU_W,
//   * the pass input : v = mu or 1 - mu, unsigned Q1.MU_W (MU_W+1 bits), so
//                      that 1 - 0 = 1.0 is representable,
//   * results        : signed, FRAC_W fraction bits below the sample LSB.
// MU_W = 4 and FRAC_W = 12 are the word lengths of the worked accuracy
// example of the design (mu = 8/2**4, result resolution 2**-12). The sample
// width X_W is this implementation's choice.
package farrow_pkg;

  localparam int unsigned X_W_DEF    = 10;  // sample width
  localparam int unsigned MU_W_DEF   = 4;   // fractional-interval width
  localparam int unsigned FRAC_W_DEF = 12;  // result fraction bits

  // What the shared half-Farrow datapath does in a given sample slot.
  //   PASS_UPPER: weights x(m-1), x(m) with C-2(1-mu), C-1(1-mu)
  //   PASS_LOWER: weights x(m+2), x(m+1) with C-2(mu),   C-1(mu)
  typedef enum logic [1:0] {
    PASS_IDLE  = 2'd0,
    PASS_UPPER = 2'd1,
    PASS_LOWER = 2'd2
  } pass_e;

endpackage

// farrow_half: one half of the cubic Lagrange Farrow structure.
//
// Computes  s = a * C-2(v) + b * C-1(v)  with the cubic Lagrange weights
//   C-2(v) = (v^3 - v) / 6
//   C-1(v) = -v^3/2 + v^2/2 + v
// Because the cubic interpolator is symmetric, C0(mu) = C-1(1-mu) and
// C1(mu) = C-2(1-mu), so the full four-tap interpolant is the sum of two
// evaluations of this half, one with v = 1-mu and one with v = mu. This
// module is that shared half.
//
// Arithmetic, as in the simplified Farrow half: the polynomial is evaluated
// in Horner form
//   s = ((p3 * v + p2) * v + p1) * v
//   p3 = a/6 - b/2,  p2 = b/2,  p1 = b - a/6
// which costs one divide-by-6, one shift (b/2), four adders and three
// multipliers. The divide-by-6 is a multiplication by the rounded-up
// reciprocal 2**K/6, K = X_W+FRAC_W+1, followed by a shift; in synthesis the
// constant product becomes a shift-and-add network. Each multiplication by v
// keeps FRAC_W fraction bits (arithmetic shift right by MU_W, truncating
// toward minus infinity). The total error is a few LSBs of 2**-FRAC_W;
// v = 0 gives exactly 0 and v = 1.0 gives exactly b.
//
// Interface: purely combinational.
//   a, b : signed X_W-bit samples (a takes C-2, b takes C-1)
//   v    : unsigned Q1.MU_W, 0 .. 2**MU_W (= 1.0)
//   s    : signed, FRAC_W fraction bits, X_W+FRAC_W+2 bits wide
// The Horner form, the operator count and the sharing come from the design;
// the word lengths of the intermediate terms are this implementation's.
module farrow_half
  import farrow_pkg::*;
#(
  parameter  int unsigned X_W    = X_W_DEF,
  parameter  int unsigned MU_W   = MU_W_DEF,
  parameter  int unsigned FRAC_W = FRAC_W_DEF,
  localparam int unsigned S_W    = X_W + FRAC_W + 2
) (
  input  logic signed [X_W-1:0] a,
  input  logic signed [X_W-1:0] b,
  input  logic        [MU_W:0]  v,
  output logic signed [S_W-1:0] s
);

  // Internal word: |t4| <= (7/6 + 7/6) * max|x|, so two integer bits of
  // headroom over the sample width suffice.
  localparam int unsigned IW  = S_W;
  // Reciprocal of 6 with K fraction bits; R6 < 2**(K-2), so R_W bits signed.
  localparam int unsigned K   = X_W + FRAC_W + 1;
  localparam int unsigned R_W = K - 1;
  localparam longint unsigned R6 = ((64'd1 << K) + 64'd5) / 64'd6;
  localparam int unsigned AR_W = X_W + R_W;
  localparam int unsigned PW  = IW + MU_W + 2;  // product width

  logic signed [R_W-1:0]  r6;
  logic signed [AR_W-1:0] a_r;
  logic signed [IW-1:0]   a6, bh, bf;
  logic signed [IW-1:0]   p3, p2, p1;
  logic signed [MU_W+1:0] vs;
  logic signed [PW-1:0]   m1, m2, m3;
  logic signed [IW-1:0]   t1, t2, t3, t4, t5;

  assign r6 = R_W'(R6);
  assign vs = signed'({1'b0, v});

  always_comb begin
    // scalar division: a/6 with FRAC_W fraction bits
    a_r = AR_W'(a) * AR_W'(r6);
    a6  = IW'(a_r >>> (K - FRAC_W));
    // shift: b/2 with FRAC_W fraction bits, and b itself
    bh  = IW'(b) <<< (FRAC_W - 1);
    bf  = IW'(b) <<< FRAC_W;
    // Farrow branch coefficients
    p3  = a6 - bh;
    p2  = bh;
    p1  = bf - a6;
    // Horner evaluation in v
    m1  = PW'(p3) * PW'(vs);
    t1  = IW'(m1 >>> MU_W);
    t2  = t1 + p2;
    m2  = PW'(t2) * PW'(vs);
    t3  = IW'(m2 >>> MU_W);
    t4  = t3 + p1;
    m3  = PW'(t4) * PW'(vs);
    t5  = IW'(m3 >>> MU_W);
    s   = t5;
  end

endmodule

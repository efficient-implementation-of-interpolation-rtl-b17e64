// farrow_cubic_tm: cubic Lagrange interpolator for symbol timing recovery,
// built on one time-shared half of a Farrow structure.
//
// A receiver samples its input with a free-running clock and corrects the
// timing afterwards: for a basepoint sample x(m) and a fractional interval
// mu (both from the timing control unit) it computes the interpolant
//   y = x(m+2)C-2(mu) + x(m+1)C-1(mu) + x(m)C0(mu) + x(m-1)C1(mu).
// The cubic Lagrange weights are symmetric, C0(mu) = C-1(1-mu) and
// C1(mu) = C-2(1-mu), so y is two evaluations of the same half structure
// (farrow_half):
//   upper pass, in the slot of x(m):   w1 = x(m-1)C-2(1-mu) + x(m)C-1(1-mu)
//   lower pass, in the slot of x(m+2): w4 = x(m+2)C-2(mu)   + x(m+1)C-1(mu)
//   y = w3 + w4, with w3 the upper result delayed two slots (w1 -> w2 -> w3).
// The datapath therefore holds one half (one divide-by-6, one shift, four
// adders, three multipliers), one output adder, a MUX choosing mu or 1-mu,
// an input switch that orders the sample pair for the pass (in the upper
// pass the older sample takes C-2, in the lower pass the newer one), an
// output switch sending the half's result to the delay line or to the
// output adder, and three delay cells: the previous sample and w2, w3.
// farrow_ctrl decides the pass in each slot.
//
// Interface:
//   clk, rst_n    : clock; synchronous reset, active low, clears the delay
//                   cells and the output.
//   x_valid, x_in : sample stream, one sample per cycle with x_valid high;
//                   x_in feeds the half combinationally in its own slot.
//   strobe, mu    : interpolation request, given in the slot of x(m).
//   y, y_valid    : result, FRAC_W fraction bits; y_valid is a one-cycle
//                   pulse in the cycle after x(m+2) was accepted.
//   req_drop      : a request two slots after an accepted one was refused.
// Timing: latency from x(m+2) to y is one clock; one request can start in
// every slot except the second after an accepted one. With one request per
// four samples this is the two-plus-two slot schedule of the design.
// The structure and the slot schedule follow the design; word lengths, the
// request interface, the registered output and the drop rule are this
// implementation's own choices.
module farrow_cubic_tm
  import farrow_pkg::*;
#(
  parameter  int unsigned X_W    = X_W_DEF,
  parameter  int unsigned MU_W   = MU_W_DEF,
  parameter  int unsigned FRAC_W = FRAC_W_DEF,
  localparam int unsigned S_W    = X_W + FRAC_W + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  x_valid,
  input  logic signed [X_W-1:0] x_in,
  input  logic                  strobe,
  input  logic [MU_W-1:0]       mu,
  output logic signed [S_W-1:0] y,
  output logic                  y_valid,
  output logic                  req_drop
);

  pass_e                 pass;
  logic [MU_W-1:0]       mu_pass;
  logic signed [X_W-1:0] x_prev;      // delay cell: previous sample
  logic signed [X_W-1:0] a, b;
  logic        [MU_W:0]  v;
  logic signed [S_W-1:0] w1, w2, w3, w4;

  farrow_ctrl #(.MU_W(MU_W)) u_ctrl (
    .clk, .rst_n, .x_valid, .strobe, .mu,
    .pass, .mu_pass, .drop(req_drop)
  );

  always_comb begin
    // MUX: lower pass uses mu, upper pass uses 1 - mu (Q1.MU_W)
    if (pass == PASS_LOWER) v = {1'b0, mu_pass};
    else                    v = (MU_W+1)'(1 << MU_W) - {1'b0, mu_pass};
    // input switch: order the pair (a takes C-2, b takes C-1)
    if (pass == PASS_LOWER) begin
      a = x_in;   b = x_prev;
    end else begin
      a = x_prev; b = x_in;
    end
  end

  farrow_half #(.X_W(X_W), .MU_W(MU_W), .FRAC_W(FRAC_W)) u_half (
    .a, .b, .v, .s(w1)
  );

  // output switch: the lower-pass result goes to the output adder
  assign w4 = (pass == PASS_LOWER) ? w1 : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_prev  <= '0;
      w2      <= '0;
      w3      <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (x_valid) begin
        x_prev <= x_in;
        // upper-pass results enter the two-slot delay line w2 -> w3
        w2     <= (pass == PASS_UPPER) ? w1 : '0;
        w3     <= w2;
        if (pass == PASS_LOWER) begin
          y       <= w3 + w4;
          y_valid <= 1'b1;
        end
      end
    end
  end

endmodule

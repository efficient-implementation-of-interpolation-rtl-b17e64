// tb_farrow_half: self-checking test of the shared half-Farrow datapath.
//
// Drives random and corner sample pairs and every value of v from 0 to 1.0,
// and compares s with a*C-2(v) + b*C-1(v) evaluated in floating point from
// the Lagrange weights (v^3-v)/6 and -v^3/2+v^2/2+v. The fixed-point result
// must lie within TOL LSBs (of 2**-FRAC_W) of that value; v = 0 must give
// exactly 0 and v = 1.0 exactly b. A small clock only paces the test and
// drives the watchdog.
module tb_farrow_half;
  import farrow_pkg::*;

  localparam int unsigned X_W    = X_W_DEF;
  localparam int unsigned MU_W   = MU_W_DEF;
  localparam int unsigned FRAC_W = FRAC_W_DEF;
  localparam int unsigned S_W    = X_W + FRAC_W + 2;
  localparam real         TOL    = 4.0;

  logic                  clk = 1'b0;
  logic signed [X_W-1:0] a, b;
  logic        [MU_W:0]  v;
  logic signed [S_W-1:0] s;
  int checks = 0, failures = 0, cycles = 0;

  farrow_half dut (.a, .b, .v, .s);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_half(int ai, int bi, int vi);
    real vr, c2, c1;
    vr = real'(vi) / real'(1 << MU_W);
    c2 = (vr*vr*vr - vr) / 6.0;
    c1 = -0.5*vr*vr*vr + 0.5*vr*vr + vr;
    return real'(ai) * c2 + real'(bi) * c1;
  endfunction

  task automatic check_one(int ai, int bi, int vi);
    real got, exp, err;
    a = X_W'(ai); b = X_W'(bi); v = (MU_W+1)'(vi);
    @(posedge clk);
    #1;
    got = real'(s) / real'(1 << FRAC_W);
    exp = ref_half(ai, bi, vi);
    err = (got - exp) * real'(1 << FRAC_W);
    checks++;
    if (err > TOL || err < -TOL) begin
      failures++;
      $display("FAIL a=%0d b=%0d v=%0d/%0d: got %f expected %f", ai, bi, vi,
               1 << MU_W, got, exp);
    end
    if (vi == 0) begin
      checks++;
      if (s != '0) begin
        failures++;
        $display("FAIL v=0 must give 0, got %0d", s);
      end
    end
    if (vi == (1 << MU_W)) begin
      checks++;
      if (s != (S_W'(bi) <<< FRAC_W)) begin
        failures++;
        $display("FAIL v=1 must give b=%0d exactly, got %f", bi, got);
      end
    end
  endtask

  localparam int XMAX = (1 << (X_W-1)) - 1;
  localparam int XMIN = -(1 << (X_W-1));

  initial begin
    int corners[6];
    corners = '{XMIN, XMIN+1, -1, 0, 1, XMAX};
    // corners of the sample range at every v
    foreach (corners[i])
      foreach (corners[j])
        for (int vi = 0; vi <= (1 << MU_W); vi++)
          check_one(corners[i], corners[j], vi);
    // random pairs
    for (int n = 0; n < 3000; n++)
      check_one(int'($signed(X_W'($urandom))), int'($signed(X_W'($urandom))),
                int'($urandom_range(0, 1 << MU_W)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_farrow_cubic_tm: end-to-end test of the time-shared cubic interpolator,
// at its default word lengths.
//
// The testbench plays the timing control unit and the sampler. It keeps every
// sample it sends and every request the interpolator should accept (a request
// two slots after an accepted one is refused), and for each accepted request
// at basepoint m it computes the four-tap cubic Lagrange interpolant from the
// direct coefficients C-2..C1 in floating point. The result must arrive in
// the cycle after x(m+2) was accepted and lie within TOL LSBs.
// Phases:
//   1. the worked accuracy example: samples 1, 2, 3, 4 and mu = 8/16 must
//      give 2.5 to within the 16/4096 error (56 dB signal to sampling noise)
//      reported for the design;
//   2. one request every four samples (the design's two-plus-two schedule)
//      with random samples and mu;
//   3. a resampler: request instants spaced 3.7 samples apart on a sine wave,
//      as a timing loop at about four samples per symbol would issue them;
//   4. random requests and gaps in the sample stream: back-to-back requests,
//      refused requests, stalls and mu = 0 (so 1 - mu = 1.0).
// Each mechanism is counted and must happen at least once.
module tb_farrow_cubic_tm;
  import farrow_pkg::*;

  localparam int unsigned X_W    = X_W_DEF;
  localparam int unsigned MU_W   = MU_W_DEF;
  localparam int unsigned FRAC_W = FRAC_W_DEF;
  localparam int unsigned S_W    = X_W + FRAC_W + 2;
  localparam real         TOL    = 8.0;
  localparam int          NMAX   = 20000;

  typedef struct {
    int              m;
    logic [MU_W-1:0] mu;
  } req_t;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  x_valid = 1'b0;
  logic signed [X_W-1:0] x_in = '0;
  logic                  strobe = 1'b0;
  logic [MU_W-1:0]       mu = '0;
  logic signed [S_W-1:0] y;
  logic                  y_valid;
  logic                  req_drop;

  int checks = 0, failures = 0, cycles = 0;
  int x_h[NMAX];
  bit acc_h[NMAX];
  int slot = 0;
  req_t pending[$];
  bit   last_valid = 1'b0;
  int   last_slot = -1;
  int   last_acc = -10;
  real  sig_pow = 0.0, err_pow = 0.0;
  real  last_y = 0.0;
  int   last_y_slot = -1;
  int n_out = 0, n_drop = 0, n_b2b = 0, n_mu0 = 0, n_gap = 0, n_upper = 0,
      n_lower = 0, n_frame4 = 0, n_nco = 0;
  int phase = 0;

  farrow_cubic_tm dut (.clk, .rst_n, .x_valid, .x_in, .strobe, .mu, .y,
                       .y_valid, .req_drop);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real interp_ref(int m, logic [MU_W-1:0] mc);
    real u, cm2, cm1, c0, c1;
    u   = real'(mc) / real'(1 << MU_W);
    cm2 = (1.0/6.0)*u*u*u - (1.0/6.0)*u;
    cm1 = -0.5*u*u*u + 0.5*u*u + u;
    c0  = 0.5*u*u*u - u*u - 0.5*u + 1.0;
    c1  = -(1.0/6.0)*u*u*u + 0.5*u*u - (1.0/3.0)*u;
    return real'(x_h[m+2])*cm2 + real'(x_h[m+1])*cm1 + real'(x_h[m])*c0
         + real'((m >= 1) ? x_h[m-1] : 0)*c1;
  endfunction

  // Check what the last clock edge produced, then apply one cycle of input.
  task automatic cycle(bit v, int xs, bit s, logic [MU_W-1:0] m);
    bit  due, e_drop;
    real got, exp, err;
    @(negedge clk);
    // output of the previous cycle's slot
    checks++;
    if (last_valid && pending.size() > 0 && pending[0].m + 2 == last_slot) begin
      if (!y_valid) begin
        failures++;
        $display("FAIL no result for basepoint %0d in the cycle after x(m+2)",
                 pending[0].m);
      end else begin
        got = real'(y) / real'(1 << FRAC_W);
        exp = interp_ref(pending[0].m, pending[0].mu);
        err = got - exp;
        last_y = got;
        last_y_slot = last_slot;
        sig_pow += exp*exp;
        err_pow += err*err;
        n_out++;
        if (phase == 2) n_frame4++;
        if (phase == 3) n_nco++;
        if (err*real'(1 << FRAC_W) > TOL || err*real'(1 << FRAC_W) < -TOL) begin
          failures++;
          $display("FAIL m=%0d mu=%0d: y=%f expected %f", pending[0].m,
                   pending[0].mu, got, exp);
        end
      end
      void'(pending.pop_front());
    end else if (y_valid) begin
      failures++;
      $display("FAIL unexpected result at slot %0d", last_slot);
    end
    // new input
    x_valid = v; x_in = X_W'(xs); strobe = s; mu = m;
    #1;
    last_valid = v;
    e_drop = 1'b0;
    if (v) begin
      due    = (slot >= 2) && acc_h[slot-2];
      e_drop = s && due;
      x_h[slot]   = xs;
      acc_h[slot] = s && !due;
      if (s && !due) begin
        pending.push_back('{m: slot, mu: m});
        n_upper++;
        if (slot - last_acc == 1) n_b2b++;
        if (m == '0) n_mu0++;
        last_acc = slot;
      end
      if (due) n_lower++;
      if (e_drop) n_drop++;
      last_slot = slot;
      slot++;
    end else begin
      n_gap++;
    end
    checks++;
    if (req_drop != e_drop) begin
      failures++;
      $display("FAIL req_drop=%b expected %b at slot %0d", req_drop, e_drop, slot);
    end
  endtask

  function automatic int rnd_x();
    return $urandom_range(0, (1 << X_W) - 1) - (1 << (X_W-1));
  endfunction

  initial begin
    real t_next, ssnr;
    int  lat_slot;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. worked example: x = 1, 2, 3, 4, interpolate at x(m)=2 with mu = 8/16
    phase = 1;
    cycle(1, 0, 0, '0);
    cycle(1, 1, 0, '0);
    cycle(1, 2, 1, MU_W'(8));     // basepoint m: sample 2
    lat_slot = slot + 1;          // index of x(m+2)
    cycle(1, 3, 0, '0);
    cycle(1, 4, 0, '0);           // x(m+2)
    cycle(1, 0, 0, '0);           // checks the result of the previous cycle
    checks++;
    ssnr = 10.0 * $log10((2.5*2.5) / (((2.5-last_y)*(2.5-last_y)) + 1.0e-30));
    $display("worked example: y=%f (ideal 2.5), SSNR %0.1f dB", last_y, ssnr);
    if (n_out != 1 || ssnr < 56.0 || last_y_slot != lat_slot) begin
      failures++;
      $display("FAIL worked example: outputs=%0d y=%f", n_out, last_y);
    end

    // 2. the two-plus-two schedule: one request every four samples
    phase = 2;
    for (int n = 0; n < 400; n++)
      cycle(1, rnd_x(), (n % 4 == 0), MU_W'($urandom));

    // 3. resampler: request instants 3.7 samples apart on a sine wave
    phase = 3;
    t_next = real'(slot) + 2.25;
    for (int n = 0; n < 2000; n++) begin
      int  xs;
      bit  s;
      real fr;
      xs = int'($floor(0.9 * real'((1 << (X_W-1)) - 1) *
                       $sin(2.0 * 3.14159265358979 * real'(slot) / 29.6)));
      s  = (slot == int'($floor(t_next)));
      fr = t_next - $floor(t_next);
      cycle(1, xs, s, MU_W'(int'($floor(fr * real'(1 << MU_W)))));
      if (s) t_next += 3.7;
    end

    // 4. random requests and stalls
    phase = 4;
    for (int n = 0; n < 6000; n++) begin
      logic [MU_W-1:0] mr;
      mr = ($urandom_range(0, 7) == 0) ? '0 : MU_W'($urandom);
      cycle($urandom_range(0, 7) != 0, rnd_x(), $urandom_range(0, 1) == 1, mr);
    end
    // flush
    repeat (4) cycle(1, 0, 0, '0);

    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d requests never produced a result", pending.size());
    end
    $display("outputs=%0d (four-sample schedule %0d, resampler %0d)", n_out,
             n_frame4, n_nco);
    $display("upper passes=%0d lower passes=%0d back-to-back=%0d refused=%0d stalls=%0d mu=0 requests=%0d",
             n_upper, n_lower, n_b2b, n_drop, n_gap, n_mu0);
    $display("SSNR against exact cubic interpolation: %0.1f dB",
             10.0 * $log10(sig_pow / err_pow));
    checks++;
    if (n_frame4 == 0 || n_nco == 0 || n_b2b == 0 || n_drop == 0 || n_gap == 0
        || n_mu0 == 0 || n_lower == 0 || n_upper == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// farrow_ctrl: pass sequencer of the time-shared cubic Farrow interpolator.
//
// One cubic interpolant y(m + mu) needs two evaluations of the shared half
// datapath: the upper pass, in the sample slot where x(m) arrives, on
// x(m-1), x(m) with v = 1 - mu, and the lower pass, two sample slots later
// when x(m+2) arrives, on x(m+1), x(m+2) with v = mu. This block tells the
// datapath which pass to run in every sample slot and which mu to use:
//   * a request (strobe with mu, from the timing control unit) in the slot of
//     x(m) starts an upper pass at once,
//   * the request and its mu travel down a two-slot delay line; when they
//     leave it the lower pass runs,
//   * a lower pass that is due has priority over a new request; a request
//     arriving exactly two slots after an accepted one would need the half
//     twice in one slot, so it is dropped and drop pulses. Requests one slot
//     apart, or three or more slots apart, are all served.
// With one request every four samples this gives exactly the two-plus-two
// slot sequence of the design (samples 1-2 with 1-mu, samples 3-4 with mu).
// The drop rule and the request interface are this implementation's choice.
//
// Timing: a slot is a clock cycle with x_valid high; the delay line only
// moves in such cycles, so gaps in the sample stream stall everything.
// pass, mu_pass and drop are combinational in the current slot. rst_n is a
// synchronous, active-low reset that empties the delay line.
module farrow_ctrl
  import farrow_pkg::*;
#(
  parameter int unsigned MU_W = MU_W_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            x_valid,   // a new sample arrives this cycle
  input  logic            strobe,    // request: interpolate at x(m) + mu
  input  logic [MU_W-1:0] mu,        // fractional interval of the request
  output pass_e           pass,      // what the shared half runs now
  output logic [MU_W-1:0] mu_pass,   // mu of the request being served
  output logic            drop       // request refused (collides with a lower pass)
);

  logic [1:0]            req_q;      // accepted requests, 1 and 2 slots ago
  logic [1:0][MU_W-1:0]  mu_q;       // their mu values
  logic                  lower_due;
  logic                  accept;

  assign lower_due = req_q[1];
  assign accept    = x_valid && strobe && !lower_due;
  assign drop      = x_valid && strobe && lower_due;

  always_comb begin
    if (!x_valid)       pass = PASS_IDLE;
    else if (lower_due) pass = PASS_LOWER;
    else if (strobe)    pass = PASS_UPPER;
    else                pass = PASS_IDLE;
    mu_pass = lower_due ? mu_q[1] : mu;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_q <= '0;
      mu_q  <= '0;
    end else if (x_valid) begin
      req_q <= {req_q[0], accept};
      mu_q  <= {mu_q[0], mu};
    end
  end

  // Every upper pass is remembered for its lower pass, and a refused request
  // only happens while a lower pass occupies the slot.
  a_upper_queued : assert property (@(posedge clk) disable iff (!rst_n)
    (x_valid && pass == PASS_UPPER) |=> req_q[0]);
  a_drop_on_lower : assert property (@(posedge clk) disable iff (!rst_n)
    drop |-> pass == PASS_LOWER);

endmodule

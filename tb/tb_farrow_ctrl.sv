// tb_farrow_ctrl: self-checking test of the pass sequencer.
//
// The expected schedule is worked out from a record of every sample slot:
// a request accepted in slot n owes a lower pass in slot n+2 with its own mu;
// that lower pass takes the slot, and a request arriving in it is dropped.
// First a directed run with one request every four samples must give the
// repeating slot pattern upper, idle, lower, idle; then a random run with
// gaps in the sample stream (x_valid low), back-to-back requests and
// colliding requests checks pass, mu_pass and drop in every cycle.
module tb_farrow_ctrl;
  import farrow_pkg::*;

  localparam int unsigned MU_W  = MU_W_DEF;
  localparam int          NSLOT = 4000;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            x_valid, strobe;
  logic [MU_W-1:0] mu;
  pass_e           pass;
  logic [MU_W-1:0] mu_pass;
  logic            drop;
  int checks = 0, failures = 0, cycles = 0;

  // slot history
  bit              acc_h[NSLOT+8];
  logic [MU_W-1:0] mu_h[NSLOT+8];
  int              slot;
  int              n_upper = 0, n_lower = 0, n_drop = 0, n_gap = 0;

  farrow_ctrl dut (.clk, .rst_n, .x_valid, .strobe, .mu, .pass, .mu_pass, .drop);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one cycle of stimulus (inputs change at the falling edge), check the
  // combinational outputs, and wait for the next falling edge.
  task automatic step(bit v, bit s, logic [MU_W-1:0] m);
    pass_e           e_pass;
    logic [MU_W-1:0] e_mu;
    bit              e_drop, due;
    x_valid = v; strobe = s; mu = m;
    #1;
    if (v) begin
      due    = (slot >= 2) && acc_h[slot-2];
      e_pass = due ? PASS_LOWER : (s ? PASS_UPPER : PASS_IDLE);
      e_drop = s && due;
      e_mu   = due ? mu_h[slot-2] : m;
      acc_h[slot] = s && !due;
      mu_h[slot]  = m;
      slot++;
    end else begin
      n_gap++;
      e_pass = PASS_IDLE;
      e_drop = 1'b0;
      e_mu   = mu_pass;       // not used when idle
    end
    checks++;
    if (pass != e_pass || drop != e_drop ||
        (e_pass != PASS_IDLE && mu_pass != e_mu)) begin
      failures++;
      $display("FAIL slot %0d: pass=%s drop=%b mu_pass=%0d, expected %s %b %0d",
               slot, pass.name(), drop, mu_pass, e_pass.name(), e_drop, e_mu);
    end
    if (pass == PASS_UPPER) n_upper++;
    if (pass == PASS_LOWER) n_lower++;
    if (drop)               n_drop++;
    @(negedge clk);
  endtask

  initial begin
    pass_e pat[4];
    rst_n = 1'b0; x_valid = 1'b0; strobe = 1'b0; mu = '0;
    slot = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: one request per four samples
    pat = '{PASS_UPPER, PASS_IDLE, PASS_LOWER, PASS_IDLE};
    for (int n = 0; n < 40; n++) begin
      x_valid = 1'b1; strobe = (n % 4 == 0); mu = MU_W'(n);
      #1;
      checks++;
      if (pass != pat[n % 4] || (pass == PASS_LOWER && mu_pass != MU_W'(n-2))) begin
        failures++;
        $display("FAIL four-slot schedule at %0d: %s", n, pass.name());
      end
      acc_h[slot] = (n % 4 == 0); mu_h[slot] = MU_W'(n); slot++;
      @(negedge clk);
    end
    // random: gaps, spacing 1, 2 (collision) and more
    for (int n = 0; n < NSLOT - 60; n++)
      step($urandom_range(0, 9) != 0, $urandom_range(0, 1) == 1, MU_W'($urandom));
    $display("upper=%0d lower=%0d drop=%0d gaps=%0d", n_upper, n_lower, n_drop, n_gap);
    checks++;
    if (n_upper == 0 || n_lower == 0 || n_drop == 0 || n_gap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

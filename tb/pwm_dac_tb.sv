// pwm_dac_tb: self-checking testbench for pwm_dac.
//
// A reference counter in the testbench follows the PWM counter from reset.
// Every cycle the output must equal (count < n), with n as sampled on the
// last clock edge; `period_end` must be high exactly when the reference
// counter is at its maximum, i.e. once every 2**WIDTH cycles. For whole
// periods with a fixed n the number of high cycles must equal n (duty cycle
// n/2**WIDTH) and the pulse must start at count zero. n is changed at
// period boundaries through a list of corner values and random values, and
// then also at random points inside periods.
module pwm_dac_tb;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned PERIOD = 1 << WIDTH;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [WIDTH-1:0] n = '0;
  logic             pwm, period_end;

  int checks = 0, failures = 0;

  pwm_dac #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .n, .pwm, .period_end);

  always #5 clk = ~clk;

  // Reference model: the counter value after each edge, and the output the
  // rule (count < n) gives for the counter and n just before that edge.
  int unsigned ref_cnt = 0;
  logic        exp_pwm = 1'b0;
  always @(posedge clk) if (rst_n) begin
    exp_pwm <= (ref_cnt < n);
    ref_cnt <= (ref_cnt + 1) % PERIOD;
  end

  // Cycle-by-cycle comparison, taken half a cycle after each edge. The
  // output period runs one cycle behind the counter: from ref_cnt == 1
  // (output for count 0) to ref_cnt == 0 (output for count 255).
  int unsigned      highs = 0;
  logic [WIDTH-1:0] n_period = '0;
  bit               n_fixed = 1'b1;
  int unsigned      periods = 0;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (pwm !== exp_pwm) begin
      failures++;
      $display("FAIL cnt=%0d pwm=%b expected %b", ref_cnt, pwm, exp_pwm);
    end
    checks++;
    if (period_end !== (ref_cnt == PERIOD - 1)) begin
      failures++;
      $display("FAIL period_end=%b at cnt=%0d", period_end, ref_cnt);
    end
    if (ref_cnt == 1) begin
      highs = 0;
      n_period = n;
      // On at zero for any nonzero value.
      checks++;
      if (n_period != 0 && !pwm) begin
        failures++;
        $display("FAIL pwm not on at count zero, n=%0d", n_period);
      end
    end
    if (pwm) highs++;
    if (ref_cnt == 0 && periods++ > 0 && n_fixed) begin
      checks++;
      if (highs != 32'(n_period)) begin
        failures++;
        $display("FAIL duty: %0d high cycles for n=%0d", highs, n_period);
      end
    end
  end

  task automatic wait_period_end();
    do @(negedge clk); while (ref_cnt != PERIOD - 1);
  endtask

  initial begin
    automatic logic [WIDTH-1:0] corners[7] = '{0, 1, 2, 127, 128, 254, 255};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Value set just before the period that starts at count zero.
    foreach (corners[i]) begin
      wait_period_end();
      n = corners[i];
    end
    repeat (10) begin
      wait_period_end();
      n = WIDTH'($urandom);
    end
    wait_period_end();
    // Random changes inside periods: only the per-cycle checks apply.
    n_fixed = 1'b0;
    repeat (2000) begin
      @(negedge clk);
      if ($urandom_range(0, 15) == 0) n = WIDTH'($urandom);
    end
    if (periods < 18) begin
      failures++;
      $display("FAIL only %0d periods seen", periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * PERIOD + 5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

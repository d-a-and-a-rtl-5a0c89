// lab8_tb: end-to-end testbench of the PWM DAC / ramp ADC, closed through
// behavioural models of the analog parts.
//
// lab8 drives the RC filter model with its PWM output; the comparator model
// compares the filtered ramp with a fixed input voltage and drives `over`
// back into lab8. The clock is 50 MHz (20 ns), a testbench assumption: the
// design itself does not depend on the clock rate. For each input voltage,
// among them the voltages of the lab's measurement table, the design runs
// three full ramps (3 x 65,536 cycles); the first one settles the filter.
//
// Checks:
// * PWM: in every PWM period the number of high cycles equals the ramp
//   value of that period, and each period is 256 cycles long.
// * Sawtooth: the ramp value steps by one per period and wraps every
//   256 x 256 cycles.
// * Capture: every `adc_valid` pulse follows a rising edge of `over` by two
//   or three cycles and shows the ramp value of that moment.
// * Conversion: the last result of the last ramp matches the code the
//   testbench predicts for the input from a closed-form model of the
//   filtered ramp (below), within the PWM ripple; when that model
//   predicts no crossing, the ramp must produce no capture.
// * Sawtooth level: over one settled ramp the filter voltage at IN+ has a
//   mean of 1.65 V within 30 mV and an AC RMS of 0.95 V within 50 mV, the
//   figures of an ideal 0 to 3.3 V sawtooth (VOH x 127.5/256 and
//   VOH/256 x sqrt((256^2 - 1)/12)); ripple adds a little to the latter.
// The count of each mechanism (PWM periods, ramp wraps, captures, inputs
// without a conversion) is printed, and one that never happened fails.
//
// Prediction: the testbench has its own reference for the whole loop, built
// from the description alone: an ideal PWM wave (high while a period counter
// is below the ramp value), the same first-order filter, an ideal
// comparator, and a capture of the ramp value at each rising edge of the
// comparator output. It runs two ramps from a discharged capacitor and
// returns the last capture of the second one, or -1 if that ramp has no
// rising edge. Because the filter's time constant (10 us) is not long
// against the PWM period (5.12 us), the ripple is about a third of a volt:
// the comparator toggles over a range of codes and the last capture lies
// roughly half a ripple above the input.
module lab8_tb;
  localparam real TCLK_NS = 20.0;
  localparam real RC_S    = 1.0e3 * 10.0e-9;  // R = 1 kOhm, C = 10 nF
  localparam real VOH     = 3.3;
  localparam int  WIDTH   = 8;
  localparam int  PERIOD  = 1 << WIDTH;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             over;
  logic             pwm;
  logic [WIDTH-1:0] adc_value;
  logic             adc_valid;
  logic [WIDTH-1:0] ramp;
  logic             ramp_wrap;
  real              v_ramp;
  real              v_in = 0.0;

  int checks = 0, failures = 0;

  lab8 dut (.clk, .rst_n, .over, .pwm, .adc_value, .adc_valid, .ramp, .ramp_wrap);

  rc_filter_model #(.TCLK_NS(TCLK_NS), .VOH(VOH)) u_rc (.clk, .pwm, .vout(v_ramp));
  comparator_model u_cmp (.vp(v_ramp), .vn(v_in), .over);

  always #(TCLK_NS / 2.0) clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // Predicted result for input v, or -1 when the ramp never climbs back
  // across v after the wrap.
  function automatic int predict(real v);
    real alpha, vc, vpwm;
    bit  cmp, cmp_prev;
    int  result;
    alpha    = 1.0 - $exp(-TCLK_NS * 1.0e-9 / RC_S);
    vc       = 0.0;
    cmp_prev = 1'b0;
    result   = -1;
    for (int r = 0; r < 2; r++)
      for (int n = 0; n < PERIOD; n++)
        for (int c = 0; c < PERIOD; c++) begin
          vpwm = (c < n) ? VOH : 0.0;
          vc   = vc + (vpwm - vc) * alpha;
          cmp  = (vc > v);
          if (r == 1 && cmp && !cmp_prev) result = n;
          cmp_prev = cmp;
        end
    return result;
  endfunction

  // ---- PWM and sawtooth checks ------------------------------------------
  // The PWM output runs one cycle behind the counter, so a PWM period
  // starts on the cycle after the ramp value changes.
  int unsigned cyc = 0, highs = 0, periods = 0, wraps = 0;
  logic [WIDTH-1:0] ramp_prev = '0, ramp_period = '0;
  bit               started = 1'b0;
  int unsigned      last_step = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (ramp != ramp_prev) begin
      checks++;
      if (ramp != WIDTH'(ramp_prev + 1'b1)) fail($sformatf("ramp jumped %0d -> %0d", ramp_prev, ramp));
      if (started) begin
        checks++;
        if (cyc - last_step != PERIOD) fail($sformatf("ramp step after %0d cycles", cyc - last_step));
        checks++;
        if (highs != 32'(ramp_period)) fail($sformatf("%0d high cycles for ramp value %0d", highs, ramp_period));
        periods++;
      end
      if (ramp == '0) wraps++;
      started     = 1'b1;
      last_step   = cyc;
      ramp_period = ramp;
      highs       = 0;
    end else if (started && pwm) begin
      highs++;
    end
    ramp_prev = ramp;
  end

  // ---- Capture checks ---------------------------------------------------
  logic [3:0]       over_hist = '0;   // over at the last four edges
  logic [WIDTH-1:0] ramp_at_edge;
  int unsigned      captures = 0, ramp_captures = 0;
  always @(posedge clk) if (rst_n) begin
    ramp_at_edge = ramp;
    over_hist    = {over_hist[2:0], over};
  end
  always @(negedge clk) if (rst_n && adc_valid) begin
    captures++;
    ramp_captures++;
    checks++;
    // A rising edge two or three samples back (the input changes at clock
    // edges, so it may be sampled on the edge it moves).
    if (!((over_hist[2] && !over_hist[3]) || (over_hist[1] && !over_hist[2])))
      fail("capture without a rising edge of over");
    checks++;
    if (adc_value != ramp_at_edge) fail($sformatf("captured %0d, ramp was %0d", adc_value, ramp_at_edge));
  end

  // ---- Conversions --------------------------------------------------------
  real inputs[10] = '{0.00, 0.49, 1.00, 1.50, 2.00, 2.49, 3.00, 0.80, 1.65, 2.75};
  int  no_conversion = 0, conversions = 0;

  // Mean and RMS AC of the filter voltage over one ramp.
  bit  measuring = 1'b0;
  real v_sum = 0.0, v_sq = 0.0;
  int  v_n = 0;
  always @(posedge clk) if (measuring) begin
    v_sum += v_ramp;
    v_sq  += v_ramp * v_ramp;
    v_n++;
  end

  task automatic wait_wrap();
    do @(posedge clk); while (!ramp_wrap);
  endtask

  initial begin
    int expected, tol;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait_wrap();  // first ramp starts from a discharged capacitor
    measuring = 1'b1;
    wait_wrap();
    measuring = 1'b0;
    begin
      real dc, ac;
      dc = v_sum / v_n;
      ac = $sqrt(v_sq / v_n - dc * dc);
      $display("sawtooth at IN+: DC %5.3f V, AC RMS %5.3f V over %0d cycles", dc, ac, v_n);
      checks += 2;
      if (dc < 1.65 - 0.03 || dc > 1.65 + 0.03) fail($sformatf("sawtooth DC %5.3f V", dc));
      if (ac < 0.95 - 0.05 || ac > 0.95 + 0.05) fail($sformatf("sawtooth AC RMS %5.3f V", ac));
    end
    foreach (inputs[i]) begin
      v_in = inputs[i];
      wait_wrap();
      wait_wrap();
      ramp_captures = 0;
      wait_wrap();
      repeat (4) @(negedge clk);
      expected = predict(v_in);
      checks++;
      if (expected < 0) begin
        no_conversion++;
        $display("input %4.2f V: predicted no crossing, %0d captures", v_in, ramp_captures);
        if (ramp_captures != 0) fail($sformatf("input %4.2f V gave %0d captures", v_in, ramp_captures));
      end else begin
        conversions++;
        tol = 2;
        $display("input %4.2f V: result %0d (0x%02h), predicted %0d, ideal %0.1f, %0d captures",
                 v_in, adc_value, adc_value, expected, v_in / VOH * PERIOD, ramp_captures);
        if (ramp_captures == 0) fail($sformatf("input %4.2f V gave no capture", v_in));
        else if (int'(adc_value) > expected + tol || int'(adc_value) < expected - tol)
          fail($sformatf("input %4.2f V: result %0d, predicted %0d", v_in, adc_value, expected));
      end
    end
    $display("PWM periods %0d, ramp wraps %0d, captures %0d, conversions %0d, inputs out of reach %0d",
             periods, wraps, captures, conversions, no_conversion);
    checks++;
    if (periods == 0 || wraps == 0 || captures == 0 || conversions == 0 || no_conversion == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * PERIOD * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

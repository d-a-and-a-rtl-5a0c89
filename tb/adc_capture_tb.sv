// adc_capture_tb: self-checking testbench for adc_capture.
//
// `over` is driven as pulses and gaps of random length (down to one cycle),
// changing between clock edges as an asynchronous input would; `dac`
// changes to a random value every cycle, so a capture taken one cycle early
// or late is seen. The testbench keeps its own record of the `over` level
// and the `dac` value at each clock edge. A rising edge of `over` first
// sampled at edge k must load `value` with the `dac` present at edge k+2
// and raise `valid` for the cycle after that edge (two synchronizer stages
// plus the edge detector); between captures `value` must hold. The test
// fails if no captures occur.
module adc_capture_tb;
  localparam int unsigned WIDTH = 8;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             over = 1'b0;
  logic [WIDTH-1:0] dac = '0;
  logic [WIDTH-1:0] value;
  logic             valid;

  int checks = 0, failures = 0;
  int unsigned captures = 0;

  adc_capture #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .over, .dac, .value, .valid);

  always #5 clk = ~clk;

  // Reference: levels of over at the last three edges, expected outputs.
  logic [2:0]       hist = '0;   // hist[0] = over at the latest edge
  logic [WIDTH-1:0] exp_value = '0;
  logic             exp_valid = 1'b0;
  always @(posedge clk) if (rst_n) begin
    // The edge seen in the samples of two and three edges ago is captured now.
    exp_valid = hist[1] && !hist[2];
    if (exp_valid) exp_value = dac;
    hist = {hist[1:0], over};
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (valid !== exp_valid) begin
      failures++;
      $display("FAIL valid=%b expected %b at %0t", valid, exp_valid, $time);
    end
    checks++;
    if (value !== exp_value) begin
      failures++;
      $display("FAIL value=%0d expected %0d at %0t", value, exp_value, $time);
    end
    if (valid) captures++;
    // New ramp value each cycle, away from the clock edge.
    dac <= WIDTH'($urandom);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      // Level changes at a random point within the cycle.
      repeat ($urandom_range(1, 6)) @(posedge clk);
      #($urandom_range(1, 9));
      over = ~over;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (captures < 100) begin
      failures++;
      $display("FAIL only %0d captures", captures);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sawtooth_gen_tb: self-checking testbench for sawtooth_gen.
//
// `step` is driven high on random cycles (and for one long run of
// consecutive cycles); a reference count in the testbench advances on the
// same steps, modulo 2**WIDTH. Every cycle `dac` must equal it, and `wrap`
// must be high exactly on a step taken at the maximum value. The test runs
// through several wraps of the ramp and fails if it sees none.
module sawtooth_gen_tb;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned MAXV = (1 << WIDTH) - 1;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             step = 1'b0;
  logic [WIDTH-1:0] dac;
  logic             wrap;

  int checks = 0, failures = 0;
  int unsigned ref_dac = 0;
  int unsigned wraps = 0;

  sawtooth_gen #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .step, .dac, .wrap);

  always #5 clk = ~clk;

  task automatic check_now();
    checks++;
    if (dac !== WIDTH'(ref_dac)) begin
      failures++;
      $display("FAIL dac=%0d expected %0d", dac, ref_dac);
    end
    checks++;
    if (wrap !== (step && ref_dac == MAXV)) begin
      failures++;
      $display("FAIL wrap=%b step=%b dac=%0d", wrap, step, ref_dac);
    end
    if (wrap) wraps++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      // Mostly random steps; cycles 1000..1599 step every cycle.
      step = (i >= 1000 && i < 1600) ? 1'b1 : 1'($urandom_range(0, 1));
      #1 check_now();
      @(posedge clk);
      if (step) ref_dac = (ref_dac + 1) % (MAXV + 1);
      @(negedge clk);
    end
    step = 1'b0;
    #1 check_now();
    checks++;
    if (wraps < 5) begin
      failures++;
      $display("FAIL only %0d wraps", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

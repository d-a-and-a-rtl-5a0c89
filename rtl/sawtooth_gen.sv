// sawtooth_gen: the `dac` counter that sets the PWM DAC value.
//
// A WIDTH-bit counter that adds one each time `step` is high, that is once
// per PWM period when the PWM counter is at its maximum, and wraps from
// 2**WIDTH-1 back to zero. Fed to the PWM DAC and filtered, its value gives a
// sawtooth of rising ramps from 0 V to nearly the output high voltage. The
// step-per-period rule and the wrap follow the lab description; the
// `wrap` flag (high for the one cycle in which a step takes the counter from
// its maximum to zero) and the asynchronous active-low reset to zero are
// this design's own additions. The new value appears one clock after `step`.
module sawtooth_gen #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,  // advance the ramp by one code
  output logic [WIDTH-1:0] dac,   // current ramp value
  output logic             wrap   // this step takes dac from max to zero
);

  assign wrap = step && (&dac);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dac <= '0;
    else if (step) dac <= dac + 1'b1;
  end

endmodule

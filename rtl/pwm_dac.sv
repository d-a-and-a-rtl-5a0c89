// pwm_dac: pulse-width-modulation DAC for a ramp-type ADC.
//
// A WIDTH-bit counter `count` runs continuously from 0 to 2**WIDTH-1 and
// wraps. The one-bit output `pwm` is high from the cycle the counter is zero
// up to, but not including, the cycle the counter equals the DAC value `n`,
// so its duty cycle is n/2**WIDTH (n = 0 gives a constant low). An external
// RC low-pass filter turns `pwm` into a DC level of n/2**WIDTH times the
// output high voltage. The counter, the on-at-zero / off-at-n rule and the
// 8-bit size follow the lab description.
//
// This design's own choices: `pwm` is registered (a flip-flop drives the
// pin, so it cannot glitch) and therefore follows the counter one clock
// late: the output in the cycle after the counter holds c is (c < n), with n
// as it was in that same cycle. A new `n` that arrives on the edge where the
// counter wraps to zero thus governs the whole following period, which is
// how the sawtooth counter updates it. `period_end` is high during the cycle
// in which the counter holds its maximum value; the sawtooth counter steps
// on it. Reset is asynchronous, active low, and clears the counter and the
// output.
module pwm_dac #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] n,          // DAC value: high time in clock cycles
  output logic             pwm,        // PWM output to the RC filter
  output logic             period_end  // count is at its maximum this cycle
);

  logic [WIDTH-1:0] count;       // PWM period counter
  assign period_end = &count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      pwm   <= 1'b0;
    end else begin
      count <= count + 1'b1;
      // On when the counter is at zero, off once it reaches n.
      pwm   <= (count < n);
    end
  end

endmodule

// lab8: CPLD logic of an 8-bit PWM DAC and ramp-type ADC.
//
// The PWM DAC turns the value of the sawtooth counter into a pulse train
// whose duty cycle is dac/256; an external RC filter (1 kOhm, 10 nF) smooths
// it into a slow voltage ramp from 0 V to nearly the 3.3 V output level, one
// code per PWM period, 256 periods per ramp. An external comparator compares
// the ramp with the analog input and drives `over` high once the ramp is the
// higher of the two. On each rising edge of `over` the ramp value is
// captured; that captured code is the conversion result, sent to the
// display (not part of this module) on `adc_value`.
//
// Structure (as in the lab's block diagram): pwm_dac holds the free-running
// PWM counter; its end-of-period flag steps sawtooth_gen, whose `dac` is
// both the PWM value and the value adc_capture samples. A conversion
// therefore takes one ramp, 2**WIDTH * 2**WIDTH clock cycles, and the result
// is refreshed once per ramp (more often if ripple on the filtered ramp
// makes the comparator toggle near the threshold). The clock rate is set by
// the board, not by this design. Reset is asynchronous and active low.
// `over` needs a pull-up on its pin, since the comparator output is open
// collector; that is a pin setting of the device, not logic.
module lab8 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             over,       // comparator: ramp above the input
  output logic             pwm,        // PWM DAC output, to the RC filter
  output logic [WIDTH-1:0] adc_value,  // captured conversion result
  output logic             adc_valid,  // adc_value was just loaded
  output logic [WIDTH-1:0] ramp,       // current sawtooth (DAC) value
  output logic             ramp_wrap   // ramp restarts from zero
);

  logic             period_end;

  pwm_dac #(.WIDTH(WIDTH)) u_pwm (
    .clk, .rst_n,
    .n         (ramp),
    .pwm,
    .period_end
  );

  sawtooth_gen #(.WIDTH(WIDTH)) u_saw (
    .clk, .rst_n,
    .step (period_end),
    .dac  (ramp),
    .wrap (ramp_wrap)
  );

  adc_capture #(.WIDTH(WIDTH)) u_cap (
    .clk, .rst_n,
    .over,
    .dac   (ramp),
    .value (adc_value),
    .valid (adc_valid)
  );

endmodule

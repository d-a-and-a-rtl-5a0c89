// rc_filter_model: behavioural model of the RC low-pass filter that turns
// the PWM pulses into the DAC voltage (R = 1 kOhm, C = 10 nF, so RC = 10 us).
// Not synthesizable; used by the system testbench only.
//
// The digital output is taken as an ideal source of VOL or VOH volts. The
// capacitor voltage `vout` is updated once per clock edge with the exact
// first-order step response over one clock period,
//   vout += (vin - vout) * (1 - exp(-TCLK_NS * 1e-9 / (R * C))),
// so TCLK_NS must match the clock the testbench drives. The capacitor starts
// discharged.
module rc_filter_model #(
  parameter real R_OHM   = 1.0e3,
  parameter real C_FARAD = 10.0e-9,
  parameter real VOH     = 3.3,
  parameter real VOL     = 0.0,
  parameter real TCLK_NS = 20.0
) (
  input  logic clk,
  input  logic pwm,
  output real  vout
);
  localparam real ALPHA = 1.0 - $exp(-TCLK_NS * 1.0e-9 / (R_OHM * C_FARAD));

  initial vout = 0.0;

  always @(posedge clk) vout <= vout + ((pwm ? VOH : VOL) - vout) * ALPHA;
endmodule

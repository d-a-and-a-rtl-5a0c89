// comparator_model: behavioural model of one half of the dual analog
// comparator with its open-collector output and the pull-up on the logic
// input. Not synthesizable; used by the system testbench only.
//
// `over` is high when the voltage at IN+ (`vp`, the filtered DAC ramp) is
// higher than the voltage at IN- (`vn`, the analog input), and low
// otherwise. An ideal comparator: no offset, no hysteresis, no delay beyond
// the simulator's.
module comparator_model (
  input  real  vp,
  input  real  vn,
  output logic over
);
  always_comb over = (vp > vn);
endmodule

// adc_capture: result register of the ramp ADC.
//
// The comparator output `over` goes from low to high when the filtered
// sawtooth passes the analog input. On that rising edge the current ramp
// value `dac` is captured into `value`, which is passed to the display. The
// capture-on-rising-edge rule is the lab description's; how it is done is
// this design's own choice, as follows.
//
// `over` comes from an open-collector comparator and is asynchronous to
// `clk`, so it passes through a two-flop synchronizer. A third flop holds
// the previous synchronized level; a rising edge is a synchronized high
// after a low. `value` is loaded on the clock edge after the edge is seen
// and `valid` pulses for one cycle at the same time. Timing: if `over` is
// high at clock edge k (and was low at edge k-1), `value` takes the `dac` of
// the cycle before edge k+2 and `valid` is high in the cycle after edge k+2.
// Reset (asynchronous, active low) clears all of it; the synchronizer
// resets to low, so an input that is already high after reset counts as a
// rising edge.
module adc_capture #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             over,   // comparator output, asynchronous
  input  logic [WIDTH-1:0] dac,    // current ramp value
  output logic [WIDTH-1:0] value,  // last captured ramp value
  output logic             valid   // value was loaded on the last edge
);

  logic [2:0] over_q;  // [0],[1]: synchronizer, [2]: previous level
  logic       rise;

  assign rise = over_q[1] && !over_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      over_q <= '0;
      value  <= '0;
      valid  <= 1'b0;
    end else begin
      over_q <= {over_q[1:0], over};
      valid  <= rise;
      if (rise) value <= dac;
    end
  end

endmodule

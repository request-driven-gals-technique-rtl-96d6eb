// ring_oscillator: behavioural model of the stoppable ring oscillator that
// sits inside each asynchronous wrapper's local clock generator.
//
// This is a behavioural model, not synthesizable logic: a real ring
// oscillator is an odd chain of inverters closed through a NAND gate whose
// other input is the enable, with the period set by the chain's delay.
// Here the period is a parameter. While `en` is high the output runs with
// period 2*HALF_PS picoseconds; each cycle starts with a low half, so the
// first rising edge comes HALF_PS after `en` rises. A cycle that has started
// always completes, and the output rests low when `en` is low, so the
// clock can be stopped without a shortened pulse.
//
// Tool warnings: synthesis warns that the `wait` statement is not
// synthesised, and reports a logic loop through the enable. This module is
// a behavioural model of an analogue ring of inverters; in a real chip it is
// a hand-placed ring with a NAND as the enable.
`timescale 1ps/1ps
module ring_oscillator #(
  parameter int unsigned HALF_PS = 25000   // 20 MHz by default
) (
  input  logic en,
  output logic osc
);
  initial osc = 1'b0;

  always begin
    wait (en);
    #(HALF_PS);
    if (en) begin
      osc = 1'b1;
      #(HALF_PS) osc = 1'b0;
    end
  end
endmodule

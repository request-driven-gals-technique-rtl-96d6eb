// c_element: Muller C-element with reset, the basic state-holding gate of
// asynchronous control.
//
// The output follows the inputs when they agree and keeps its value while
// they differ. It is written as a level-sensitive latch (enable: a == b,
// data: a), which is exactly the C-element's behaviour; the latch that the
// tools report for this module is therefore intended.
`timescale 1ps/1ps
module c_element (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);
  always_latch begin
    if (!rst_n)      y = 1'b0;
    else if (a == b) y = a;
  end
endmodule

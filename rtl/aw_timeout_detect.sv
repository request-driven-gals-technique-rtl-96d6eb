// aw_timeout_detect: time-out detection of the asynchronous wrapper.
//
// While the LS pipeline still holds tokens (`pending`) and the input request
// line stays low, the ring oscillator is running and this block counts its
// falling edges. Any high level on `req_in` clears the count at once
// (asynchronously), so only an unbroken idle period is measured. `timeout`
// rises when TIMEOUT_CYCLES-1 idle cycles have been counted and the line is
// still idle; the local clock generator takes it at the next falling
// oscillator edge, so local clocking starts after TIMEOUT_CYCLES idle
// oscillator periods.
//
// Follows the document: a time-out of 2-3 request-clock periods, triggered
// only when the request line is idle and data is still in the pipeline.
// Own choice: the time-out is measured in periods of the wrapper's own ring
// oscillator, which is tuned close to the request clock period.
`timescale 1ps/1ps
module aw_timeout_detect #(
  parameter int unsigned TIMEOUT_CYCLES = 3
) (
  input  logic rst_n,
  input  logic osc,          // ring oscillator of the local clock generator
  input  logic req_in,
  input  logic pending,      // tokens left in the LS pipeline
  input  logic local_mode,
  output logic timeout
);
  localparam int unsigned CW = $clog2(TIMEOUT_CYCLES + 1);
  logic [CW-1:0] cnt;
  logic          idle;
  logic          clr;

  // One asynchronous clear: reset, or any activity on the request line.
  assign clr = ~rst_n | req_in;

  assign idle = pending & ~local_mode;

  always_ff @(negedge osc or posedge clr) begin
    if (clr)                                         cnt <= '0;
    else if (!idle)                                  cnt <= '0;
    else if (cnt != CW'(TIMEOUT_CYCLES - 1))         cnt <= cnt + 1'b1;
  end

  assign timeout = idle & ~req_in & (cnt == CW'(TIMEOUT_CYCLES - 1));
endmodule

// aw_local_clock_gen: local clock generation of the asynchronous wrapper.
//
// Holds the stoppable ring oscillator, the mode flag and the flush counter.
// The LS block's clock is the request-driven clock or, in local mode, the
// gated oscillator: lsb_clk = req_clk | (osc & local_mode). `local_mode`
// only changes on a falling oscillator edge, so the hand-over in either
// direction never cuts a pulse short and the two clock sources are never
// active together.
//
// Every request-driven edge marks the pipeline as holding data (`pending`)
// and restarts the flush count. After a time-out the generator produces
// LOCAL_CYCLES clock cycles, the depth of the LS pipeline, then stops the
// oscillator. If a new request arrives first, the present local cycle is
// completed and control returns to the request line; the flush starts
// over after the next time-out. The oscillator also pauses while `hold` is
// high (an output token not yet acknowledged), which makes it a pausable
// clock. It runs only while data is pending, so an empty block is not
// clocked at all. A request that arrives while the generator is paused
// takes the clock back at once, since no local cycle is in progress.
//
// Follows the document: time-out triggered local clocking, number of local
// cycles equal to the pipeline depth, clock stalls when no valid token is
// left, completion of the present local cycle before hand-over. Own choice:
// the mutex of the real wrapper is reduced to sampling `req_in` on the
// falling oscillator edge.
//
// Tool warnings: synthesis reports a combinational loop through `osc_en`
// and the ring oscillator, and through the asynchronous clear of the
// local_mode flop (hold -> clr -> local_mode -> osc_en -> osc). The first is
// the oscillator's enable path (a stoppable ring is a loop by nature). In the
// second, the clear only acts while the oscillator is low and stopped, so it
// cannot glitch the clock.
`timescale 1ps/1ps
module aw_local_clock_gen #(
  parameter int unsigned LOCAL_CYCLES = 8,
  parameter int unsigned OSC_HALF_PS  = 25000
) (
  input  logic rst_n,
  input  logic req_in,
  input  logic req_clk,       // request-driven clock from the input port
  input  logic timeout,
  input  logic hold,          // output port waits for an acknowledge
  output logic osc,
  output logic local_mode,
  output logic pending,
  output logic lsb_clk
);
  localparam int unsigned CW = $clog2(LOCAL_CYCLES + 1);
  logic [CW-1:0] lcnt;
  logic          osc_en;

  assign osc_en = (pending | local_mode) & ~hold;

  ring_oscillator #(.HALF_PS(OSC_HALF_PS)) u_osc (.en(osc_en), .osc(osc));

  assign lsb_clk = req_clk | (osc & local_mode);

  // Flush accounting, clocked by the LS block's own clock.
  always_ff @(posedge lsb_clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      lcnt    <= '0;
    end else if (!local_mode) begin
      pending <= 1'b1;
      lcnt    <= '0;
    end else begin
      lcnt <= lcnt + 1'b1;
      if (lcnt == CW'(LOCAL_CYCLES - 1)) pending <= 1'b0;
    end
  end

  // A paused generator (oscillator at rest, low) hands the clock back at
  // once when a request arrives; there is no cycle left to complete.
  logic clr;
  assign clr = ~rst_n | (hold & req_in & ~osc);

  // Mode switch on the falling oscillator edge.
  always_ff @(negedge osc or posedge clr) begin
    if (clr)              local_mode <= 1'b0;
    else if (!local_mode) local_mode <= timeout;
    else if (!pending || req_in) local_mode <= 1'b0;
  end
endmodule

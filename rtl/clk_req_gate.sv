// clk_req_gate: turns a synchronous producer's clock and valid flag into
// the request line of an asynchronous wrapper.
//
// A synchronous producer hands a token to a request-driven wrapper simply
// by driving the wrapper's request with its own clock, gated by its valid
// flag. The request is the inverted clock, so it rises on the falling clock
// edge, half a period after the producer launched the data on the rising
// edge. The valid flag goes through a latch that is transparent while the
// clock is high (a standard clock-gating cell for the inverted clock), so
// the request never glitches. One request pulse per valid cycle; the
// acknowledge is not needed, because the wrapper absorbs every token.
`timescale 1ps/1ps
module clk_req_gate (
  input  logic clk,
  input  logic en,
  output logic req
);
  logic en_l;

  always_latch begin
    if (clk) en_l = en;
  end

  assign req = ~clk & en_l;
endmodule

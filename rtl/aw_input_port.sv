// aw_input_port: input port of the asynchronous wrapper.
//
// In request-driven mode the incoming request line itself becomes the clock
// of the locally synchronous (LS) block: `req_clk` is `req_in` passed through
// while the wrapper is not in local-clock mode. A request that arrives while
// the local clock generator owns the clock is held off: it is neither passed
// on as a clock nor acknowledged until the generator has finished its
// present cycle and dropped `local_mode` (the hand-over is glitch free
// because `local_mode` only falls while the ring oscillator is low). The
// acknowledge of the 4-phase handshake is the granted request, so the
// sender sees it right after the token's clock edge, and it returns to zero
// as soon as the request does.
//
// A request is also held off while the output port still waits for the
// acknowledge of an earlier token (`hold`): without this, a request edge
// would clock the LS block and overwrite the output token that has not yet
// been taken. `hold` only rises on a falling LS clock edge, i.e. while the
// request is low, so the gating cannot shorten a clock pulse.
//
// `in_valid` tells the LS block whether the clock edge it sees carries a
// new token (request edge) or is a flushing edge of the local clock.
//
// Follows the document: request used directly as clock, 4-phase handshake,
// a pending request waits for the present local cycle to complete. Own
// choice: requests wait for a busy output port; the acknowledge is combinational and the data is not re-latched
// (bundled data is held by the sender until the acknowledge).
//
// Tool warnings: synthesis reports combinational loops through this port.
// `ack_in` is derived from `req_in`, and the sender's request is cleared
// asynchronously by that acknowledge (4-phase handshake), so request ->
// acknowledge -> request is a loop by construction. `hold` also comes from
// this wrapper's output port, whose request is cleared by the next block's
// acknowledge. These loops are the handshake itself and settle after every
// transition.
`timescale 1ps/1ps
module aw_input_port #(
  parameter int unsigned W = 16
) (
  input  logic         req_in,
  output logic         ack_in,
  input  logic [W-1:0] data_in,
  input  logic         local_mode,   // local clock generator owns the clock
  input  logic         hold,         // output port busy: do not clock
  output logic         req_clk,      // request-driven clock to the clock mux
  output logic         in_valid,     // the current LS clock edge carries a token
  output logic [W-1:0] lsb_data
);
  always_comb begin
    req_clk  = req_in & ~local_mode & ~hold;
    ack_in   = req_clk;
    in_valid = ~local_mode;
    lsb_data = data_in;
  end
endmodule

// async_join: join of two 4-phase bundled-data channels into one, used to
// align the tokens entering receiver block Rx_2 (samples from the
// activation interface and decision feedback from FIFO_TA).
//
// The joined request is the C-element of the two input requests, so it
// rises only when both inputs carry a token and falls only when both have
// returned to zero; the single output acknowledge is fed back to both
// inputs. The output data is the concatenation {b, a}. When `b_en` is low
// the second channel is left out and channel a passes alone; this is used
// while no feedback is expected. `b_en` may only change while both
// requests are low.
//
// Follows the document: a join circuit aligns the tokens entering Rx_2 and
// the joined rate is set by the activation interface. Own choice: the
// enable that bypasses the feedback channel outside of data decoding.
//
// Tool warnings: synthesis reports a combinational loop through `ack_b`.
// FIFO_TA clears its request with this acknowledge, and the C-element output
// that forms the acknowledge depends on that request: this is the 4-phase
// handshake loop of the joined channel.
`timescale 1ps/1ps
module async_join #(
  parameter int unsigned WA = 16,
  parameter int unsigned WB = 16
) (
  input  logic          rst_n,
  input  logic          b_en,
  input  logic          req_a,
  output logic          ack_a,
  input  logic [WA-1:0] data_a,
  input  logic          req_b,
  output logic          ack_b,
  input  logic [WB-1:0] data_b,
  output logic          req_out,
  input  logic          ack_out,
  output logic [WA+WB-1:0] data_out
);
  logic b_eff, req_c;

  // A disabled channel b behaves as if it always agreed with channel a.
  assign b_eff = b_en ? req_b : req_a;

  c_element u_c (.rst_n, .a(req_a), .b(b_eff), .y(req_c));

  assign req_out  = req_c;
  assign ack_a    = ack_out;
  assign ack_b    = ack_out & b_en;
  assign data_out = {data_b, data_a};
endmodule

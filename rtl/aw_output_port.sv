// aw_output_port: output port of the asynchronous wrapper.
//
// When the LS block presents `out_valid` at a rising edge of its clock, the
// word is registered into `data_out`. The request `req_out` rises on the
// following falling clock edge, half a clock period after the data, which
// gives the bundled-data setup margin. The successor's acknowledge clears
// the request asynchronously (4-phase: req up, ack up, req down, ack down).
// The request is the token carrier: the successor uses it as its clock.
//
// `hold` is high from the rising request until the acknowledge has returned
// to zero. The wrapper pauses its local clock on it and does not grant a
// new input request while it is high, so no token is overwritten and no
// request is raised while the acknowledge still clears the flop. An
// assertion checks that no token is loaded while the channel is busy.
//
// Follows the document: 4-phase handshake between wrappers, request aligned
// with the data as token carrier, output port steering the local clock
// generator. Own choice: request launched on the falling clock edge; the busy
// signal that pauses the wrapper.
//
// Tool warnings: synthesis reports combinational loops through `clr`,
// `ack_out` and `req_out`. The request flop is cleared asynchronously by the
// acknowledge, and the receiver derives that acknowledge from the request,
// so the 4-phase handshake forms a loop through the flop's clear input. The
// loop is intended and ends once the request has returned to zero.
`timescale 1ps/1ps
module aw_output_port #(
  parameter int unsigned W = 16
) (
  input  logic         rst_n,
  input  logic         lsb_clk,
  input  logic         out_valid,
  input  logic [W-1:0] out_data,
  output logic         req_out,
  input  logic         ack_out,
  output logic [W-1:0] data_out,
  output logic         hold
);
  logic tok_q;
  logic clr;

  // One asynchronous clear for the request: reset or the acknowledge.
  assign clr = ~rst_n | ack_out;

  always_ff @(posedge lsb_clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_q    <= 1'b0;
      data_out <= '0;
    end else begin
      tok_q <= out_valid;
      if (out_valid) data_out <= out_data;
    end
  end

  always_ff @(negedge lsb_clk or posedge clr) begin
    if (clr)          req_out <= 1'b0;
    else if (tok_q)   req_out <= 1'b1;
  end

  // The channel is busy from the rising request until the acknowledge has
  // returned to zero; only then may the next token be loaded and its
  // request be raised (a request set while the acknowledge still clears
  // the flop would be lost).
  assign hold = req_out | ack_out;

  // A new output token must not be loaded while the previous one waits.
  // Checked with the values at the clock edge itself: with zero-delay
  // handshakes the acknowledge can release `hold` and the next edge can
  // follow in the same time step.
  always @(posedge lsb_clk)
    if (rst_n && out_valid)
      a_no_token_loss: assert (!req_out && !ack_out)
        else $error("aw_output_port: output token loaded before the previous one was acknowledged");
endmodule

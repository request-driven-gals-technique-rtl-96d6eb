// async_wrapper: request-driven asynchronous wrapper around one locally
// synchronous (LS) block.
//
// A burst of input tokens clocks the LS block directly: each rising edge of
// the 4-phase input request is one LS clock edge. When the request line has
// been idle for TIMEOUT_CYCLES periods of the local ring oscillator while
// data is still inside the LS pipeline, the local clock generator takes
// over and produces LOCAL_CYCLES cycles (the pipeline depth) to flush it,
// then stops. A request arriving during the flush waits for the present
// local cycle to end and then takes the clock back. Output tokens leave
// through a 4-phase output port whose request is the successor's clock.
//
// The four parts are the ones of the wrapper structure: input port,
// time-out detection, local clock generation and output port. The LS block
// itself is outside this module; it sees `lsb_clk`, `lsb_in_valid`
// (this edge carries an input token) and `lsb_data_in`, and returns
// `lsb_out_valid`/`lsb_out_data`, sampled on the rising edge of `lsb_clk`.
// `ext_hold` lets extra output ports of the same block pause the clock, and
// `lsb_out_ready` tells an LS block with back-pressure that no output token
// is waiting for its acknowledge.
`timescale 1ps/1ps
module async_wrapper #(
  parameter int unsigned DIN_W          = 16,
  parameter int unsigned DOUT_W         = 16,
  parameter int unsigned TIMEOUT_CYCLES = 3,
  parameter int unsigned LOCAL_CYCLES   = 8,
  parameter int unsigned OSC_HALF_PS    = 25000
) (
  input  logic              rst_n,
  // input channel
  input  logic              req_in,
  output logic              ack_in,
  input  logic [DIN_W-1:0]  data_in,
  // output channel
  output logic              req_out,
  input  logic              ack_out,
  output logic [DOUT_W-1:0] data_out,
  // LS block side
  output logic              lsb_clk,
  output logic              lsb_in_valid,
  output logic [DIN_W-1:0]  lsb_data_in,
  input  logic              lsb_out_valid,
  input  logic [DOUT_W-1:0] lsb_out_data,
  input  logic              ext_hold,
  output logic              lsb_out_ready,  // output port free: LS may emit
  // status
  output logic              local_mode,
  output logic              pending
);
  logic req_clk, timeout, osc, hold;

  assign lsb_out_ready = ~hold & ~ext_hold;

  aw_input_port #(.W(DIN_W)) u_in (
    .req_in, .ack_in, .data_in, .local_mode, .hold(hold | ext_hold), .req_clk,
    .in_valid(lsb_in_valid), .lsb_data(lsb_data_in));

  aw_timeout_detect #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_tod (
    .rst_n, .osc, .req_in, .pending, .local_mode, .timeout);

  aw_local_clock_gen #(.LOCAL_CYCLES(LOCAL_CYCLES), .OSC_HALF_PS(OSC_HALF_PS)) u_lcg (
    .rst_n, .req_in, .req_clk, .timeout, .hold(hold | ext_hold),
    .osc, .local_mode, .pending, .lsb_clk);

  aw_output_port #(.W(DOUT_W)) u_out (
    .rst_n, .lsb_clk, .out_valid(lsb_out_valid), .out_data(lsb_out_data),
    .req_out, .ack_out, .data_out, .hold);
endmodule

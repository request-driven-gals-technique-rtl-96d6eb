// activation_interface: token multiplexer at the receiver input.
//
// Incoming sample tokens (4-phase request/acknowledge with data, or a
// gated sample clock used as request) go either to the tracking
// synchronizer block Rx_1 or to the datapath block Rx_2. After reset they
// go to Rx_1, which searches for the synchronization pattern. When Rx_1
// reports `sync_found`, the multiplexer switches the flow to Rx_2; when Rx_2
// reports `frame_done`, it switches back to tracking. The select only
// changes on the falling edge of the input request, so a token is never
// split between the two outputs and each output request is glitch free.
// The acknowledge is taken from the selected output.
//
// Follows the document: the activation interface is a token multiplexer
// switched from 'tracking' to 'datapath' synchronizer when synchronization
// is reached. Own choice: the `frame_done` return path and switching on the
// falling request edge.
//
// Tool warnings: verilator reports UNOPTFLAT (circular combinational logic)
// on the acknowledge from Rx_2 at the top level, and synthesis reports a
// loop through `ack_in`. The acknowledge of the selected branch is routed
// back to the sender, which drops its request, which in turn drops the
// acknowledge: the handshake loop through a multiplexer. Verilator only
// evaluates it more slowly.
`timescale 1ps/1ps
module activation_interface #(
  parameter int unsigned W = 16
) (
  input  logic         rst_n,
  input  logic         req_in,
  output logic         ack_in,
  input  logic [W-1:0] data_in,
  input  logic         sync_found,   // from Rx_1: coarse synchronization reached
  input  logic         frame_done,   // from Rx_2: frame finished
  output logic         req_rx1,
  input  logic         ack_rx1,
  output logic         req_rx2,
  input  logic         ack_rx2,
  output logic [W-1:0] data_out,
  output logic         sel_datapath
);
  always_ff @(negedge req_in or negedge rst_n) begin
    if (!rst_n)             sel_datapath <= 1'b0;
    else if (!sel_datapath) sel_datapath <= sync_found;
    else                    sel_datapath <= ~frame_done;
  end

  assign req_rx1  = req_in & ~sel_datapath;
  assign req_rx2  = req_in &  sel_datapath;
  assign ack_in   = sel_datapath ? ack_rx2 : ack_rx1;
  assign data_out = data_in;
endmodule

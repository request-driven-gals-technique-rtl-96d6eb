// fifo_ta: asynchronous token rate adaptation FIFO (FIFO_TA) in the
// receiver's feedback path from Rx_3 back to Rx_2.
//
// Both sides are 4-phase handshake channels; there is no clock. The write
// pointer advances on the rising edge of the writer's request and the
// write is acknowledged at once, so the fast producer (Rx_3, 80 Msps) is
// never slowed down. On the read side `req_out` is high whenever the FIFO
// holds a word and the reader's acknowledge is low; the read pointer
// advances on the rising edge of that acknowledge, which also drops the
// request, and the next word is offered when the acknowledge returns to
// zero. Pointers are Gray coded so that the asynchronous full/empty
// comparison only ever sees one bit change at a time.
//
// Timing: one write per writer request, one read per reader acknowledge.
// Writing into a full FIFO is an error flagged by an assertion.
//
// Follows the document: an asynchronous FIFO that handshakes very fast and
// turns the backward flow into independent asynchronous tokens. Own
// choice: the depth and the Gray-pointer structure.
`timescale 1ps/1ps
module fifo_ta #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 8
) (
  input  logic         rst_n,
  input  logic         req_in,
  output logic         ack_in,
  input  logic [W-1:0] data_in,
  output logic         req_out,
  input  logic         ack_out,
  output logic [W-1:0] data_out,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wbin, rbin, wgray, rgray;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  always_ff @(posedge req_in) mem[wbin[AW-1:0]] <= data_in;

  always_ff @(posedge req_in or negedge rst_n) begin
    if (!rst_n) wbin <= '0;
    else        wbin <= wbin + 1'b1;
  end

  always_ff @(posedge ack_out or negedge rst_n) begin
    if (!rst_n) rbin <= '0;
    else        rbin <= rbin + 1'b1;
  end

  assign wgray    = b2g(wbin);
  assign rgray    = b2g(rbin);
  assign empty    = (wgray == rgray);
  assign full     = (wgray == {~rgray[AW:AW-1], rgray[AW-2:0]});
  assign ack_in   = req_in;
  assign req_out  = ~empty & ~ack_out;
  assign data_out = mem[rbin[AW-1:0]];

  a_no_overflow: assert property (@(posedge req_in) disable iff (!rst_n) !full)
    else $error("fifo_ta: write into a full FIFO");
endmodule

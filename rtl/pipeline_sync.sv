// pipeline_sync: asynchronous-to-synchronous interface (Rx_int, Tx_int).
//
// Connects an asynchronous producer (a wrapper's 4-phase output channel)
// to a synchronous consumer clocked by `clk`, e.g. the DAC clock. Words are
// written into a small buffer on the rising edge of the producer's request,
// which is acknowledged at once. The Gray-coded write pointer is passed
// through SYNC_STAGES flip-flops into the consumer clock domain; each stage
// adds robustness against metastability and one cycle of latency. The
// consumer side delivers one word per clock cycle (`out_valid`) while words
// are available.
//
// Timing: a word written by the producer appears at the output
// SYNC_STAGES+1 to SYNC_STAGES+2 consumer cycles later. Writing into a full
// buffer is flagged by an assertion.
//
// Follows the document: pipeline synchronization between an asynchronous
// producer and a synchronous consumer, more stages for more robustness.
// Own choice: buffer depth and the Gray-pointer structure.
`timescale 1ps/1ps
module pipeline_sync #(
  parameter int unsigned W           = 16,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic         rst_n,
  input  logic         req_in,
  output logic         ack_in,
  input  logic [W-1:0] data_in,
  input  logic         clk,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray_q, rbin, rgray;
  logic [AW:0]  wsync [SYNC_STAGES];
  logic         empty, full;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Producer side, clocked by the request.
  always_ff @(posedge req_in) mem[wbin[AW-1:0]] <= data_in;

  always_ff @(posedge req_in or negedge rst_n) begin
    if (!rst_n) begin
      wbin    <= '0;
      wgray_q <= '0;
    end else begin
      wbin    <= wbin + 1'b1;
      wgray_q <= b2g(wbin + 1'b1);
    end
  end
  assign ack_in = req_in;

  // Consumer side.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYNC_STAGES; i++) wsync[i] <= '0;
      rbin      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      wsync[0] <= wgray_q;
      for (int i = 1; i < SYNC_STAGES; i++) wsync[i] <= wsync[i-1];
      out_valid <= !empty;
      if (!empty) begin
        out_data <= mem[rbin[AW-1:0]];
        rbin     <= rbin + 1'b1;
      end
    end
  end

  assign rgray = b2g(rbin);
  assign empty = (rgray == wsync[SYNC_STAGES-1]);
  assign full  = (b2g(wbin) == {~rgray[AW:AW-1], rgray[AW-2:0]});

  a_no_overflow: assert property (@(posedge req_in) disable iff (!rst_n) !full)
    else $error("pipeline_sync: write into a full buffer");
endmodule

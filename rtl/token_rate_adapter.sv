// token_rate_adapter: locally synchronous token rate adaptation buffer, the
// logic inside GALS blocks Tx_2 and Rx_TRA.
//
// Words arrive one per input token (`in_valid` on a clock edge). Once a
// complete burst of BURST_WORDS words is stored, the block emits it as
// BURST_WORDS/OUT_WORDS output tokens of OUT_WORDS words each, one token per
// clock edge, oldest word in the lowest slot. Emission runs on every clock
// edge, whether it comes from the input request or from the wrapper's local
// clock, and input words keep being accepted meanwhile: the buffer holds
// two bursts, so the next symbol can be collected while the previous one
// drains. In the wrapper, a burst collected at the fast request rate is thus
// sent out at the local clock rate once the input has gone quiet.
//
// Timing: the first token leaves on the first clock edge after the last
// word of a burst was written; the rest follow on consecutive edges, except
// that no token is emitted on an edge where `out_ready` is low (the
// wrapper's output port still waits for an acknowledge).
// `out_valid`/`out_data` are registered.
//
// Follows the document: Tx_2 collects a complete burst for one symbol at
// 80 Msps and then sends it to Tx_3 in bursts of 8 tokens at about 20 Msps;
// Rx_TRA adapts the 20 Msps flow of Rx_2 to the 80 Msps of Rx_3. Own
// choice: word packing, two-burst buffer depth.
`timescale 1ps/1ps
module token_rate_adapter #(
  parameter int unsigned W           = 16,
  parameter int unsigned BURST_WORDS = 64,
  parameter int unsigned OUT_WORDS   = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [W-1:0]           in_data,
  input  logic                   out_ready,   // downstream can take a token
  output logic                   out_valid,
  output logic [OUT_WORDS*W-1:0] out_data
);
  localparam int unsigned DEPTH  = 2 * BURST_WORDS;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned TOKENS = BURST_WORDS / OUT_WORDS;
  localparam int unsigned CW     = $clog2(DEPTH + 1);
  localparam int unsigned TW     = $clog2(TOKENS + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [CW-1:0] cnt;
  logic [TW-1:0] tok_left;
  logic          sending, start, emit;

  assign start = out_ready && !sending && (cnt >= CW'(BURST_WORDS));
  assign emit  = out_ready && (sending || start);

  always_ff @(posedge clk) if (in_valid) mem[wptr] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      cnt       <= '0;
      tok_left  <= '0;
      sending   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_valid) wptr <= AW'((32'(wptr) + 1) % DEPTH);
      out_valid <= emit;
      if (emit) begin
        for (int k = 0; k < OUT_WORDS; k++)
          out_data[k*W +: W] <= mem[AW'((32'(rptr) + k) % DEPTH)];
        rptr     <= AW'((32'(rptr) + OUT_WORDS) % DEPTH);
        tok_left <= start ? TW'(TOKENS - 1) : tok_left - 1'b1;
        sending  <= start ? (TOKENS > 1) : (tok_left != TW'(1));
      end
      cnt <= cnt + CW'(in_valid) - (emit ? CW'(OUT_WORDS) : CW'(0));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> (cnt < CW'(DEPTH)))
    else $error("token_rate_adapter: buffer overflow");
endmodule

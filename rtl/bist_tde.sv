// bist_tde: BIST test data extractor on one inter-block channel.
//
// The extractor is clocked by the channel's own request: on each rising
// edge of `strobe`, while `en` is high, it folds the data word into a
// 32-bit multiple-input signature register (MISR) and counts the token.
// Words wider than 32 bits are XOR-folded in 32-bit slices first. Because it
// records data only when a valid token is present, the signature does not
// depend on when the tokens arrive, only on their values and order, which
// makes it usable with the timing non-determinism of GALS operation.
// `clear` (asynchronous) returns signature and count to zero.
//
// Follows the document: TDEs between GALS blocks, triggered by the
// handshake signals, recording data only with a valid control token. Own
// choice: the MISR compression (CRC-32 polynomial) and the token counter.
//
// Tool warnings: synthesis reports logic loops through the strobe at the
// top level. The strobe is a handshake request or acknowledge, and those
// signals are part of the request/acknowledge loop of the channel the
// extractor watches. The extractor only observes the loop and does not
// drive it.
`timescale 1ps/1ps
module bist_tde #(
  parameter int unsigned W = 16
) (
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       en,
  input  logic                       strobe,
  input  logic [W-1:0]               data,
  output logic [gals_pkg::SIG_W-1:0] signature,
  output logic [15:0]                count
);
  import gals_pkg::*;
  localparam int unsigned SLICES = (W + SIG_W - 1) / SIG_W;

  logic [SLICES*SIG_W-1:0] wide;
  logic [SIG_W-1:0]        folded;
  logic                    clr;

  assign wide = (SLICES*SIG_W)'(data);
  assign clr  = ~rst_n | clear;

  always_comb begin
    folded = '0;
    for (int s = 0; s < int'(SLICES); s++) folded ^= wide[s*SIG_W +: SIG_W];
  end

  always_ff @(posedge strobe or posedge clr) begin
    if (clr) begin
      signature <= '0;
      count     <= '0;
    end else if (en) begin
      signature <= misr_step(signature, folded);
      count     <= count + 1'b1;
    end
  end
endmodule

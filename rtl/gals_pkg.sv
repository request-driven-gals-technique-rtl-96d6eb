// gals_pkg: constants shared by the request-driven GALS baseband.
//
// Holds the default word width of the inter-block channels, the BIST test
// numbering and the MISR helper used by the test data extractors. The word
// width is this design's own choice; the test list follows the five BIST
// tests named for the baseband processor (global, transmitter, receiver,
// receiver feedback loop, Rx_3).
`timescale 1ps/1ps
package gals_pkg;

  // Width of one sample/word on the inter-block channels (own choice).
  parameter int unsigned DATA_W = 16;

  // Number of test pattern generators and test data extractors.
  parameter int unsigned N_TPG = 5;
  parameter int unsigned N_TDE = 11;
  parameter int unsigned SIG_W = 32;

  // The five BIST tests run by the central BIST controller.
  typedef enum logic [2:0] {
    TEST_GLOBAL   = 3'd0,  // TPG0, transmitter looped back into receiver
    TEST_TX       = 3'd1,  // TPG1 into Tx_2
    TEST_RX       = 3'd2,  // TPG2 (preamble then random) into the receiver
    TEST_RX_LOOP  = 3'd3,  // TPG3 into Rx_TRA: receiver feedback loop
    TEST_RX3      = 3'd4   // TPG4 into Rx_3
  } test_e;

  // One MISR step: shift with CRC-32 feedback, then fold in the data word.
  function automatic logic [SIG_W-1:0] misr_step(input logic [SIG_W-1:0] sig,
                                                 input logic [SIG_W-1:0] din);
    logic [SIG_W-1:0] nxt;
    nxt = {sig[SIG_W-2:0], 1'b0};
    if (sig[SIG_W-1]) nxt = nxt ^ 32'h04C1_1DB7;
    return nxt ^ din;
  endfunction

endpackage

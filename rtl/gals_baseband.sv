// gals_baseband: request-driven GALS infrastructure of an IEEE 802.11a
// baseband processor: transmitter, receiver with its feedback token ring,
// and the BIST structure.
//
// Transmitter: the synchronous block Tx_1 (outside, on the external 80 MHz
// clock) hands its words to wrapper Tx_2 by driving the request with its
// gated clock. Tx_2 holds a token rate adapter: it collects the 64 words of
// one symbol at 80 Msps, and after the time-out its 20 MHz local clock sends
// them on as 8 tokens of 8 words to wrapper Tx_3 (IFFT, guard and preamble
// insertion, outside). Tx_3 flushes each symbol with 72 local cycles. Its
// output reaches the DAC clock domain through the pipeline synchronizer
// Tx_int.
//
// Receiver: samples from the ADC (gated 20 MHz clock as request) pass the
// activation interface, a token multiplexer that feeds the tracking
// synchronizer Rx_1 until it reports synchronization and then the datapath
// block Rx_2, until Rx_2 reports the end of the frame. Rx_2's input is the
// join of the sample flow and the decision feedback from FIFO_TA. Rx_2 feeds
// wrapper Rx_TRA, a rate adapter that collects bursts at 20 Msps and sends
// them at 80 Msps to Rx_3 (demapper, deinterleaver, Viterbi decoder,
// descrambler, outside). Rx_3's decoded output reaches the MAC clock through
// Rx_int; its re-encoded feedback goes back through the asynchronous FIFO_TA
// to the join, closing the token ring.
//
// BIST: five pattern generators (TPG0..4) can replace the normal source of
// five channels, eleven extractors (TDE0..10) record the tokens on the
// channels between blocks, and the central controller, clocked by the
// tester clock, runs the five tests and reports test_ok. In the global test
// the transmitter output is looped back into the receiver input.
//
// The locally synchronous DSP blocks are not part of this module: each
// wrapper's LS-side signals (clock, input token, output token) are ports.
// Partitioning, rates, burst sizes (8 tokens, 72 local cycles), the
// activation interface, join, FIFO_TA, async-sync interfaces and BIST
// positions follow the document; word widths, depths, the local cycle
// counts of the receiver wrappers and the feedback enable are this
// design's own choices.
//
// Tool warnings: verilator reports UNOPTFLAT on `act_rx2_ack`, and synthesis
// reports logic loops. Each is a 4-phase handshake loop (request ->
// acknowledge -> request cleared) that runs through a wrapper, the
// activation multiplexer, the join, the TPG multiplexers or an extractor
// trigger, plus the ring-oscillator enable loops. The submodules' headers
// explain each kind. Some status outputs are left open on purpose: wrapper
// `pending`, FIFO `empty`/`full`, TDE `count`, and `lsb_out_ready` of
// wrappers whose LS side never waits. TPG0's `tpg_sel` bit and `tpg_busy`
// are not used either, because TPG0 always drives its own port towards Tx_1.
// The SYNCASYNCNET lint note on `rst_n` arises because the reset is merged with
// handshake signals into combined asynchronous clear signals, and it also
// disables the assertions. It is still only an asynchronous reset.
`timescale 1ps/1ps
module gals_baseband
  import gals_pkg::*;
#(
  parameter int unsigned W              = gals_pkg::DATA_W,
  parameter int unsigned TIMEOUT_CYCLES = 3,
  parameter int unsigned TX_BURST_WORDS = 64,      // IFFT points per symbol
  parameter int unsigned TX_TOKEN_WORDS = 8,       // 8 tokens per symbol
  parameter int unsigned TX2_LOCAL      = 17,      // two bursts of 8 + 1
  parameter int unsigned TX3_LOCAL      = 72,
  parameter int unsigned RX1_LOCAL      = 16,
  parameter int unsigned RX2_LOCAL      = 16,
  parameter int unsigned RX_BURST_WORDS = 64,
  parameter int unsigned RXTRA_LOCAL    = 129,     // two bursts of 64 + 1
  parameter int unsigned RX3_LOCAL      = 64,
  parameter int unsigned OSC20_HALF_PS  = 25000,   // 20 MHz local clocks
  parameter int unsigned OSC80_HALF_PS  = 6250,    // 80 MHz local clocks
  parameter int unsigned FIFO_TA_DEPTH  = 16,
  parameter int unsigned INT_DEPTH      = 16,
  parameter int unsigned SYNC_STAGES    = 2,
  parameter int unsigned TPG_PRE_WORDS  = 160,
  parameter int unsigned BIST_SETTLE    = 4096,
  parameter int unsigned BIST_MAX       = 1_000_000
) (
  input  logic                   rst_n,
  // Tx_1 (synchronous, external 80 MHz clock) output
  input  logic                   tx_clk,
  input  logic                   tx1_valid,
  input  logic [W-1:0]           tx1_data,
  // Tx_3 LS block (IFFT, guard interval, preamble insertion)
  output logic                   tx3_clk,
  output logic                   tx3_in_valid,
  output logic [TX_TOKEN_WORDS*W-1:0] tx3_in_data,
  input  logic                   tx3_out_valid,
  input  logic [W-1:0]           tx3_out_data,
  output logic                   tx3_out_ready,
  // DAC side of Tx_int
  input  logic                   dac_clk,
  output logic                   tx_out_valid,
  output logic [W-1:0]           tx_out_data,
  // ADC
  input  logic                   adc_clk,
  input  logic                   adc_valid,
  input  logic [W-1:0]           adc_data,
  // Rx_1 LS block (tracking synchronizer)
  output logic                   rx1_clk,
  output logic                   rx1_in_valid,
  output logic [W-1:0]           rx1_in_data,
  input  logic                   rx1_out_valid,
  input  logic [W-1:0]           rx1_out_data,
  input  logic                   rx1_sync_found,
  output logic                   rx1_req_out,
  input  logic                   rx1_ack_out,
  output logic [W-1:0]           rx1_data_out,
  // Rx_2 LS block (synchronizer datapath, FFT, channel estimator)
  output logic                   rx2_clk,
  output logic                   rx2_in_valid,
  output logic [2*W-1:0]         rx2_in_data,   // {feedback, sample}
  input  logic                   rx2_out_valid,
  input  logic [W-1:0]           rx2_out_data,
  input  logic                   rx2_frame_done,
  input  logic                   rx2_fb_en,
  // Rx_3 LS block (demapper ... descrambler, re-encoding for feedback)
  output logic                   rx3_clk,
  output logic                   rx3_in_valid,
  output logic [W-1:0]           rx3_in_data,
  input  logic                   rx3_out_valid,
  input  logic [W-1:0]           rx3_out_data,
  input  logic                   rx3_fb_valid,
  input  logic [W-1:0]           rx3_fb_data,
  output logic                   rx3_out_ready,
  // MAC side of Rx_int
  input  logic                   mac_clk,
  output logic                   rx_out_valid,
  output logic [W-1:0]           rx_out_data,
  // BIST
  input  logic                   bist_clk,
  input  logic                   bist_start,
  input  test_e                  bist_test_sel,
  input  logic [15:0]            bist_num_words,
  input  logic [SIG_W-1:0]       bist_exp_sig [N_TDE],
  output logic [SIG_W-1:0]       bist_sig     [N_TDE],
  output logic                   bist_busy,
  output logic                   bist_done,
  output logic                   test_ok,
  output logic                   tpg0_req,      // TPG0 drives Tx_1's input
  input  logic                   tpg0_ack,
  output logic [W-1:0]           tpg0_data,
  output logic                   tpg0_init,     // initialise the transmitter
  input  logic                   tx1_in_strobe, // Tx_1 input, watched by TDE0
  input  logic [W-1:0]           tx1_in_data,
  // status
  output logic [5:0]             local_mode,    // Tx_2, Tx_3, Rx_1, Rx_2, Rx_TRA, Rx_3
  output logic                   act_datapath
);
  localparam int unsigned TXW = TX_TOKEN_WORDS * W;

  // ---------------------------------------------------------------- BIST control
  logic [N_TPG-1:0] tpg_start, tpg_sel, tpg_done, tpg_busy, tpg_init;
  logic [N_TDE-1:0] tde_en;
  logic             tde_clear, loop_en;
  logic             tpg_req [N_TPG];
  logic             tpg_ack [N_TPG];
  logic [W-1:0]     tpg_data [N_TPG];

  bist_cbc #(.SETTLE_CYCLES(BIST_SETTLE), .MAX_CYCLES(BIST_MAX)) u_cbc (
    .clk(bist_clk), .rst_n, .start(bist_start), .test_sel(bist_test_sel),
    .exp_sig(bist_exp_sig), .tde_sig(bist_sig), .tpg_done, .tpg_start, .tpg_sel,
    .tde_en, .tde_clear, .loop_en, .busy(bist_busy), .done(bist_done), .test_ok);

  for (genvar g = 0; g < int'(N_TPG); g++) begin : g_tpg
    bist_tpg #(.W(W), .SEED(16'hACE1 + 16'(g)), .PRE_WORDS(TPG_PRE_WORDS)) u_tpg (
      .clk(bist_clk), .rst_n, .start(tpg_start[g]), .preamble_en(g == 2),
      .num_words(bist_num_words), .req_out(tpg_req[g]), .ack_out(tpg_ack[g]),
      .data_out(tpg_data[g]), .init(tpg_init[g]), .busy(tpg_busy[g]), .done(tpg_done[g]));
  end

  assign tpg0_req   = tpg_req[0];
  assign tpg0_data  = tpg_data[0];
  assign tpg_ack[0] = tpg0_ack;
  assign tpg0_init  = tpg_init[0];

  // ---------------------------------------------------------------- transmitter
  logic         tx1_req;
  logic         tx2_req, tx2_ack;
  logic [W-1:0] tx2_din;
  logic         tx23_req, tx23_ack;
  logic [TXW-1:0] tx23_data;
  logic         tx2_clk, tx2_in_valid, tx2_out_valid, tx2_out_ready;
  logic [W-1:0] tx2_lsb_din;
  logic [TXW-1:0] tx2_out_data;
  logic         tx3i_req, tx3i_ack;
  logic [W-1:0] tx3i_data;

  clk_req_gate u_tx1_gate (.clk(tx_clk), .en(tx1_valid), .req(tx1_req));

  // TPG1 can replace Tx_1 as the source of Tx_2.
  assign tx2_req    = tpg_sel[1] ? tpg_req[1]  : tx1_req;
  assign tx2_din    = tpg_sel[1] ? tpg_data[1] : tx1_data;
  assign tpg_ack[1] = tpg_sel[1] & tx2_ack;

  async_wrapper #(.DIN_W(W), .DOUT_W(TXW), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                  .LOCAL_CYCLES(TX2_LOCAL), .OSC_HALF_PS(OSC20_HALF_PS)) u_aw_tx2 (
    .rst_n, .req_in(tx2_req), .ack_in(tx2_ack), .data_in(tx2_din),
    .req_out(tx23_req), .ack_out(tx23_ack), .data_out(tx23_data),
    .lsb_clk(tx2_clk), .lsb_in_valid(tx2_in_valid), .lsb_data_in(tx2_lsb_din),
    .lsb_out_valid(tx2_out_valid), .lsb_out_data(tx2_out_data), .ext_hold(1'b0),
    .lsb_out_ready(tx2_out_ready), .local_mode(local_mode[0]), .pending());

  token_rate_adapter #(.W(W), .BURST_WORDS(TX_BURST_WORDS), .OUT_WORDS(TX_TOKEN_WORDS)) u_tx2_tra (
    .clk(tx2_clk), .rst_n, .in_valid(tx2_in_valid), .in_data(tx2_lsb_din),
    .out_ready(tx2_out_ready), .out_valid(tx2_out_valid), .out_data(tx2_out_data));

  async_wrapper #(.DIN_W(TXW), .DOUT_W(W), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                  .LOCAL_CYCLES(TX3_LOCAL), .OSC_HALF_PS(OSC20_HALF_PS)) u_aw_tx3 (
    .rst_n, .req_in(tx23_req), .ack_in(tx23_ack), .data_in(tx23_data),
    .req_out(tx3i_req), .ack_out(tx3i_ack), .data_out(tx3i_data),
    .lsb_clk(tx3_clk), .lsb_in_valid(tx3_in_valid), .lsb_data_in(tx3_in_data),
    .lsb_out_valid(tx3_out_valid), .lsb_out_data(tx3_out_data), .ext_hold(1'b0),
    .lsb_out_ready(tx3_out_ready), .local_mode(local_mode[1]), .pending());

  pipeline_sync #(.W(W), .DEPTH(INT_DEPTH), .SYNC_STAGES(SYNC_STAGES)) u_tx_int (
    .rst_n, .req_in(tx3i_req), .ack_in(tx3i_ack), .data_in(tx3i_data),
    .clk(dac_clk), .out_valid(tx_out_valid), .out_data(tx_out_data));

  // ---------------------------------------------------------------- receiver input
  logic         src_clk, src_valid, src_req;
  logic [W-1:0] src_data;
  logic         rxi_req, rxi_ack;
  logic [W-1:0] rxi_data;

  // BIST internal loop: transmitter output straight into the receiver.
  assign src_clk   = loop_en ? dac_clk      : adc_clk;
  assign src_valid = loop_en ? tx_out_valid : adc_valid;
  assign src_data  = loop_en ? tx_out_data  : adc_data;

  clk_req_gate u_rx_gate (.clk(src_clk), .en(src_valid), .req(src_req));

  assign rxi_req    = tpg_sel[2] ? tpg_req[2]  : src_req;
  assign rxi_data   = tpg_sel[2] ? tpg_data[2] : src_data;
  assign tpg_ack[2] = tpg_sel[2] & rxi_ack;

  logic         act_rx1_req, act_rx1_ack, act_rx2_req, act_rx2_ack;
  logic [W-1:0] act_data;

  activation_interface #(.W(W)) u_act (
    .rst_n, .req_in(rxi_req), .ack_in(rxi_ack), .data_in(rxi_data),
    .sync_found(rx1_sync_found), .frame_done(rx2_frame_done),
    .req_rx1(act_rx1_req), .ack_rx1(act_rx1_ack), .req_rx2(act_rx2_req), .ack_rx2(act_rx2_ack),
    .data_out(act_data), .sel_datapath(act_datapath));

  // ---------------------------------------------------------------- Rx_1
  async_wrapper #(.DIN_W(W), .DOUT_W(W), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                  .LOCAL_CYCLES(RX1_LOCAL), .OSC_HALF_PS(OSC20_HALF_PS)) u_aw_rx1 (
    .rst_n, .req_in(act_rx1_req), .ack_in(act_rx1_ack), .data_in(act_data),
    .req_out(rx1_req_out), .ack_out(rx1_ack_out), .data_out(rx1_data_out),
    .lsb_clk(rx1_clk), .lsb_in_valid(rx1_in_valid), .lsb_data_in(rx1_in_data),
    .lsb_out_valid(rx1_out_valid), .lsb_out_data(rx1_out_data), .ext_hold(1'b0),
    .lsb_out_ready(), .local_mode(local_mode[2]), .pending());

  // ---------------------------------------------------------------- Rx_2 with join
  logic         fta_req, fta_ack;     // FIFO_TA output channel
  logic [W-1:0] fta_data;
  logic         j_req, j_ack;
  logic [2*W-1:0] j_data;
  logic         rx2o_req, rx2o_ack;
  logic [W-1:0] rx2o_data;

  async_join #(.WA(W), .WB(W)) u_join (
    .rst_n, .b_en(rx2_fb_en),
    .req_a(act_rx2_req), .ack_a(act_rx2_ack), .data_a(act_data),
    .req_b(fta_req), .ack_b(fta_ack), .data_b(fta_data),
    .req_out(j_req), .ack_out(j_ack), .data_out(j_data));

  async_wrapper #(.DIN_W(2*W), .DOUT_W(W), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                  .LOCAL_CYCLES(RX2_LOCAL), .OSC_HALF_PS(OSC20_HALF_PS)) u_aw_rx2 (
    .rst_n, .req_in(j_req), .ack_in(j_ack), .data_in(j_data),
    .req_out(rx2o_req), .ack_out(rx2o_ack), .data_out(rx2o_data),
    .lsb_clk(rx2_clk), .lsb_in_valid(rx2_in_valid), .lsb_data_in(rx2_in_data),
    .lsb_out_valid(rx2_out_valid), .lsb_out_data(rx2_out_data), .ext_hold(1'b0),
    .lsb_out_ready(), .local_mode(local_mode[3]), .pending());

  // ---------------------------------------------------------------- Rx_TRA
  logic         tra_req, tra_ack;
  logic [W-1:0] tra_din;
  logic         tra_clk, tra_in_valid, tra_out_valid, tra_out_ready;
  logic [W-1:0] tra_lsb_din, tra_out_data;
  logic         tra3_req, tra3_ack;
  logic [W-1:0] tra3_data;

  // TPG3 can replace Rx_2 as the source of Rx_TRA; Rx_2's output is then
  // acknowledged and dropped.
  assign tra_req    = tpg_sel[3] ? tpg_req[3]  : rx2o_req;
  assign tra_din    = tpg_sel[3] ? tpg_data[3] : rx2o_data;
  assign tpg_ack[3] = tpg_sel[3] & tra_ack;
  assign rx2o_ack   = tpg_sel[3] ? rx2o_req : tra_ack;

  async_wrapper #(.DIN_W(W), .DOUT_W(W), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                  .LOCAL_CYCLES(RXTRA_LOCAL), .OSC_HALF_PS(OSC80_HALF_PS)) u_aw_rxtra (
    .rst_n, .req_in(tra_req), .ack_in(tra_ack), .data_in(tra_din),
    .req_out(tra3_req), .ack_out(tra3_ack), .data_out(tra3_data),
    .lsb_clk(tra_clk), .lsb_in_valid(tra_in_valid), .lsb_data_in(tra_lsb_din),
    .lsb_out_valid(tra_out_valid), .lsb_out_data(tra_out_data), .ext_hold(1'b0),
    .lsb_out_ready(tra_out_ready), .local_mode(local_mode[4]), .pending());

  token_rate_adapter #(.W(W), .BURST_WORDS(RX_BURST_WORDS), .OUT_WORDS(1)) u_rx_tra (
    .clk(tra_clk), .rst_n, .in_valid(tra_in_valid), .in_data(tra_lsb_din),
    .out_ready(tra_out_ready), .out_valid(tra_out_valid), .out_data(tra_out_data));

  // ---------------------------------------------------------------- Rx_3
  logic         rx3_req, rx3_ack;
  logic [W-1:0] rx3_din;
  logic         rx3o_req, rx3o_ack, fb_req, fb_ack, fb_hold;
  logic [W-1:0] rx3o_data, fb_data;

  assign rx3_req    = tpg_sel[4] ? tpg_req[4]  : tra3_req;
  assign rx3_din    = tpg_sel[4] ? tpg_data[4] : tra3_data;
  assign tpg_ack[4] = tpg_sel[4] & rx3_ack;
  assign tra3_ack   = tpg_sel[4] ? tra3_req : rx3_ack;

  async_wrapper #(.DIN_W(W), .DOUT_W(W), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                  .LOCAL_CYCLES(RX3_LOCAL), .OSC_HALF_PS(OSC80_HALF_PS)) u_aw_rx3 (
    .rst_n, .req_in(rx3_req), .ack_in(rx3_ack), .data_in(rx3_din),
    .req_out(rx3o_req), .ack_out(rx3o_ack), .data_out(rx3o_data),
    .lsb_clk(rx3_clk), .lsb_in_valid(rx3_in_valid), .lsb_data_in(rx3_in_data),
    .lsb_out_valid(rx3_out_valid), .lsb_out_data(rx3_out_data), .ext_hold(fb_hold),
    .lsb_out_ready(rx3_out_ready), .local_mode(local_mode[5]), .pending());

  // Second output port of Rx_3: the re-encoded feedback towards FIFO_TA.
  aw_output_port #(.W(W)) u_rx3_fb_port (
    .rst_n, .lsb_clk(rx3_clk), .out_valid(rx3_fb_valid), .out_data(rx3_fb_data),
    .req_out(fb_req), .ack_out(fb_ack), .data_out(fb_data), .hold(fb_hold));

  fifo_ta #(.W(W), .DEPTH(FIFO_TA_DEPTH)) u_fifo_ta (
    .rst_n, .req_in(fb_req), .ack_in(fb_ack), .data_in(fb_data),
    .req_out(fta_req), .ack_out(fta_ack), .data_out(fta_data), .empty(), .full());

  pipeline_sync #(.W(W), .DEPTH(INT_DEPTH), .SYNC_STAGES(SYNC_STAGES)) u_rx_int (
    .rst_n, .req_in(rx3o_req), .ack_in(rx3o_ack), .data_in(rx3o_data),
    .clk(mac_clk), .out_valid(rx_out_valid), .out_data(rx_out_data));

  // ---------------------------------------------------------------- TDEs
  logic tx_out_strobe;
  clk_req_gate u_tde4_gate (.clk(dac_clk), .en(tx_out_valid), .req(tx_out_strobe));

  logic       tde_strobe [N_TDE];
  logic [TXW-1:0] tde_data [N_TDE];

  always_comb begin
    tde_strobe[0]  = tx1_in_strobe;  tde_data[0]  = TXW'(tx1_in_data);
    tde_strobe[1]  = tx2_req;        tde_data[1]  = TXW'(tx2_din);
    tde_strobe[2]  = tx23_req;       tde_data[2]  = tx23_data;
    tde_strobe[3]  = tx3i_req;       tde_data[3]  = TXW'(tx3i_data);
    tde_strobe[4]  = tx_out_strobe;  tde_data[4]  = TXW'(tx_out_data);
    tde_strobe[5]  = rxi_req;        tde_data[5]  = TXW'(rxi_data);
    tde_strobe[6]  = tra_req;        tde_data[6]  = TXW'(tra_din);
    tde_strobe[7]  = rx3_req;        tde_data[7]  = TXW'(rx3_din);
    tde_strobe[8]  = fb_req;         tde_data[8]  = TXW'(fb_data);
    tde_strobe[9]  = fta_ack;        tde_data[9]  = TXW'(fta_data);
    tde_strobe[10] = rx3o_req;       tde_data[10] = TXW'(rx3o_data);
  end

  for (genvar g = 0; g < int'(N_TDE); g++) begin : g_tde
    bist_tde #(.W(TXW)) u_tde (
      .rst_n, .clear(tde_clear), .en(tde_en[g]), .strobe(tde_strobe[g]),
      .data(tde_data[g]), .signature(bist_sig[g]), .count());
  end
endmodule

// tb_gals_baseband: end-to-end test of the GALS baseband infrastructure at
// its default parameters.
//
// Small behavioural stand-ins replace the DSP blocks that live outside the
// top (Tx_1 source, Tx_3 IFFT block, Rx_1 tracking synchronizer, Rx_2
// datapath, Rx_3 decoder); they only move and tag data so that every word
// can be traced:
//   Tx_1   sends symbols of 64 words at 80 MHz, one symbol every 4.5 us;
//          5 symbols, the SIGNAL and data symbols of a 100-byte frame at
//          54 Mbps.
//   Tx_3   takes 8 tokens of 8 words per symbol and emits 80 samples, one
//          per clock edge: the 64 words, then words 48..63 again.
//   Rx_1   reports synchronization after 40 samples.
//   Rx_2   receives the remaining 680 samples of a 720-sample frame (the
//          same 100-byte frame), forwards the 64 words of each of the 5
//          symbols (preamble and guard samples dropped), reports the end of
//          the frame and consumes decision feedback through the join while
//          FIFO_TA holds some.
//   Rx_3   emits sample^16'h5A5A for every word and, while a frame is
//          received, a feedback word (word+1) for every fourth word.
// The stand-ins update their queues on the clock edge and present their
// next output through registers, like a real pipeline register.
// Checked: the DAC sample stream, 8 request-driven tokens and 72 local
// cycles of Tx_3 per symbol, the MAC output stream (only complete 64-word
// bursts pass Rx_TRA), the feedback words seen by Rx_2, and a BIST
// transmitter test whose expected signatures are computed here from the
// pattern generator's LFSR: once with correct values (test_ok) and once
// with one wrong value. The local Rx_3 test is run twice against
// signatures computed here. A global BIST test checks that the internal loop
// carries transmitter output into the receiver. Every mechanism (time-out
// and local flush in each wrapper, hand-over to the request line, pausing
// on a pending output, activation switch both ways, join with feedback,
// FIFO_TA traffic, internal loop) is counted and must occur.
`timescale 1ps/1ps
module tb_gals_baseband;
  import gals_pkg::*;
  localparam int W = 16, TXW = 128;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #2_000_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ DUT
  logic rst_n = 1'b1;
  logic tx_clk = 0, dac_clk = 0, adc_clk = 0, mac_clk = 0, bist_clk = 0;
  logic tx1_valid = 0; logic [W-1:0] tx1_data = 0;
  logic tx3_clk, tx3_in_valid, tx3_out_ready; logic [TXW-1:0] tx3_in_data;
  logic tx3_out_valid; logic [W-1:0] tx3_out_data;
  logic tx_out_valid; logic [W-1:0] tx_out_data;
  logic adc_valid = 0; logic [W-1:0] adc_data = 0;
  logic rx1_clk, rx1_in_valid; logic [W-1:0] rx1_in_data;
  logic rx1_sync_found = 0, rx1_req_out; logic [W-1:0] rx1_data_out;
  logic rx2_clk, rx2_in_valid; logic [2*W-1:0] rx2_in_data;
  logic rx2_out_valid = 0; logic [W-1:0] rx2_out_data = 0;
  logic rx2_frame_done = 0, rx2_fb_en = 0;
  logic rx3_clk, rx3_in_valid, rx3_out_ready; logic [W-1:0] rx3_in_data;
  logic rx3_out_valid, rx3_fb_valid; logic [W-1:0] rx3_out_data, rx3_fb_data;
  logic rx_out_valid; logic [W-1:0] rx_out_data;
  logic bist_start = 0; test_e bist_sel = TEST_TX; logic [15:0] bist_num = 16'd128;
  logic [SIG_W-1:0] exp_sig [N_TDE], sig [N_TDE];
  logic bist_busy, bist_done, test_ok;
  logic tpg0_req, tpg0_ack, tpg0_init; logic [W-1:0] tpg0_data;
  logic [5:0] local_mode; logic act_datapath;

  gals_baseband dut (
    .rst_n, .tx_clk, .tx1_valid, .tx1_data,
    .tx3_clk, .tx3_in_valid, .tx3_in_data, .tx3_out_valid, .tx3_out_data, .tx3_out_ready,
    .dac_clk, .tx_out_valid, .tx_out_data,
    .adc_clk, .adc_valid, .adc_data,
    .rx1_clk, .rx1_in_valid, .rx1_in_data, .rx1_out_valid(1'b0), .rx1_out_data('0),
    .rx1_sync_found, .rx1_req_out, .rx1_ack_out(rx1_req_out), .rx1_data_out,
    .rx2_clk, .rx2_in_valid, .rx2_in_data, .rx2_out_valid, .rx2_out_data,
    .rx2_frame_done, .rx2_fb_en,
    .rx3_clk, .rx3_in_valid, .rx3_in_data, .rx3_out_valid, .rx3_out_data,
    .rx3_fb_valid, .rx3_fb_data, .rx3_out_ready,
    .mac_clk, .rx_out_valid, .rx_out_data,
    .bist_clk, .bist_start, .bist_test_sel(bist_sel), .bist_num_words(bist_num),
    .bist_exp_sig(exp_sig), .bist_sig(sig), .bist_busy, .bist_done, .test_ok,
    .tpg0_req, .tpg0_ack, .tpg0_data, .tpg0_init,
    .tx1_in_strobe(tpg0_req), .tx1_in_data(tpg0_data),
    .local_mode, .act_datapath);

  always #6250  tx_clk  = ~tx_clk;    // 80 MHz
  always #25000 dac_clk = ~dac_clk;   // 20 MHz
  always #25000 adc_clk = ~adc_clk;   // 20 MHz
  always #6250  mac_clk = ~mac_clk;   // 80 MHz
  always #5000  bist_clk = ~bist_clk; // 100 MHz tester clock

  // ------------------------------------------------------------ Tx_1 model
  // Functional mode: symbols from tx_sym; BIST global mode: words from TPG0.
  logic [W-1:0] tx1_q[$];
  bit tpg0_mode = 0;
  assign tpg0_ack = tpg0_req;                 // Tx_1 input takes each word
  always @(posedge tpg0_req) if (tpg0_mode) tx1_q.push_back(tpg0_data);
  always @(posedge tx_clk) begin
    if (tx1_q.size() >= 64 || (tx1_q.size() > 0 && tx1_valid)) begin
      tx1_valid <= 1'b1; tx1_data <= tx1_q.pop_front();
    end else tx1_valid <= 1'b0;
  end
  task automatic tx_symbol(input int s);
    for (int i = 0; i < 64; i++) tx1_q.push_back(W'(s * 256 + i));
  endtask

  // ------------------------------------------------------------ Tx_3 model
  logic [W-1:0] tx3_q[$];
  logic [W-1:0] tx3_sym[$];
  int tx3_tokens = 0, tx3_req_edges = 0, tx3_loc_edges = 0;
  int tx3_req_per_sym[$], tx3_loc_per_sym[$];
  // The models update their queues on the clock edge and present the head
  // word through registers written with non-blocking assignments, so the
  // output ports always sample the word presented before the edge (also
  // when two clock pulses fall into one time step).
  logic tx3_head_v = 0; logic [W-1:0] tx3_head = '0;
  // When nothing is queued, the first word of an arriving token goes straight
  // to the output port (bundled data is stable before the request edge), so
  // 8 request edges and 72 local edges deliver all 80 samples of a symbol.
  assign tx3_out_valid = tx3_out_ready && (tx3_head_v || tx3_in_valid);
  assign tx3_out_data  = tx3_head_v ? tx3_head : tx3_in_data[W-1:0];
  always @(posedge tx3_clk) if (rst_n) begin
    automatic bit direct = tx3_out_valid && !tx3_head_v;
    if (tx3_out_valid && tx3_head_v) void'(tx3_q.pop_front());
    if (tx3_in_valid) begin
      tx3_req_edges++;
      for (int k = 0; k < 8; k++) begin
        if (!(direct && k == 0)) tx3_q.push_back(tx3_in_data[k*W +: W]);
        tx3_sym.push_back(tx3_in_data[k*W +: W]);
      end
      if (++tx3_tokens % 8 == 0) begin
        for (int k = 48; k < 64; k++) tx3_q.push_back(tx3_sym[k]);
        tx3_sym.delete();
      end
    end else tx3_loc_edges++;
    tx3_head_v <= tx3_q.size() > 0;
    tx3_head   <= tx3_q.size() > 0 ? tx3_q[0] : '0;
  end
  always @(negedge local_mode[1]) if (rst_n) begin
    tx3_req_per_sym.push_back(tx3_req_edges); tx3_loc_per_sym.push_back(tx3_loc_edges);
    tx3_req_edges = 0; tx3_loc_edges = 0;
  end

  // DAC: expected sample stream.
  logic [W-1:0] dac_exp[$];
  int dac_n = 0;
  bit dac_check = 1;
  always @(posedge dac_clk) if (tx_out_valid && dac_check) begin
    dac_n++;
    if (dac_exp.size() == 0) check(0, "unexpected DAC sample");
    else begin
      logic [W-1:0] e; e = dac_exp.pop_front();
      if (tx_out_data != e) check(0, $sformatf("DAC sample %h expected %h", tx_out_data, e));
    end
  end

  // ------------------------------------------------------------ Rx models
  // Frame of the 100-byte, 54 Mbps case: 16 us preamble + 5 symbols of 4 us
  // = 720 samples at 20 Msps; Rx_1 takes the first 40 preamble samples.
  int rx1_n = 0, rx2_n = 0, sync_at = 40, frame_len = 680, pre_left = 280, nsym_rx = 5;
  logic [W-1:0] fb_exp[$];
  int fb_prod = 0, fb_cons = 0, fb_bad = 0;
  logic [W-1:0] last_sample = 0;
  bit have_last = 0;
  int sample_gaps = 0;

  always @(posedge rx1_clk) if (rst_n && rx1_in_valid) begin
    rx1_n++;
    if (rx1_n == sync_at) rx1_sync_found <= 1'b1;
  end
  always @(posedge act_datapath) rx1_sync_found <= 1'b0;

  always @(posedge rx2_clk) if (rst_n) begin
    // Only the 64 FFT words of each symbol (guard interval of 16 samples
    // dropped, preamble consumed) travel on towards Rx_3.
    rx2_out_valid <= rx2_in_valid && rx2_n >= pre_left && (rx2_n - pre_left) % 80 >= 16;
    rx2_out_data  <= rx2_in_data[W-1:0];
    if (rx2_in_valid) begin
      rx2_n++;
      if (have_last && rx2_in_data[W-1:0] != last_sample + 1'b1) sample_gaps++;
      last_sample = rx2_in_data[W-1:0]; have_last = 1;
      if (rx2_fb_en) begin
        fb_cons++;
        if (fb_exp.size() == 0 || rx2_in_data[2*W-1:W] != fb_exp[0]) fb_bad++;
        if (fb_exp.size() > 0) void'(fb_exp.pop_front());
      end
      if (rx2_n == frame_len) rx2_frame_done <= 1'b1;
    end
  end
  always @(negedge act_datapath) rx2_frame_done <= 1'b0;
  // Feedback only while enough words wait in FIFO_TA; switched while the
  // request is low.
  always @(negedge rx2_clk) rx2_fb_en <= (fb_prod - fb_cons) >= 2;

  logic [W-1:0] rx3_q[$], rx3_fbq[$];
  int rx3_in_n = 0;
  logic rx3_head_v = 0, rx3_fb_head_v = 0; logic [W-1:0] rx3_head = '0, rx3_fb_head = '0;
  assign rx3_out_valid = rx3_out_ready && rx3_head_v;
  assign rx3_out_data  = rx3_head;
  assign rx3_fb_valid  = rx3_out_ready && rx3_fb_head_v;
  assign rx3_fb_data   = rx3_fb_head;
  always @(posedge rx3_clk) if (rst_n) begin
    if (rx3_out_valid) void'(rx3_q.pop_front());
    if (rx3_fb_valid) begin void'(rx3_fbq.pop_front()); fb_prod++; end
    if (rx3_in_valid) begin
      rx3_q.push_back(rx3_in_data ^ 16'h5A5A);
      // Channel-tracking feedback is only useful while a frame is received.
      if (rx3_in_n % 4 == 3 && act_datapath) begin
        rx3_fbq.push_back(rx3_in_data + 1'b1); fb_exp.push_back(rx3_in_data + 1'b1);
      end
      rx3_in_n++;
    end
    rx3_head_v    <= rx3_q.size() > 0;
    rx3_head      <= rx3_q.size() > 0 ? rx3_q[0] : '0;
    rx3_fb_head_v <= rx3_fbq.size() > 0;
    rx3_fb_head   <= rx3_fbq.size() > 0 ? rx3_fbq[0] : '0;
  end

  logic [W-1:0] mac_got[$];
  always @(posedge mac_clk) if (rx_out_valid) mac_got.push_back(rx_out_data);

  // ADC sample source.
  bit adc_on = 0;
  always @(posedge adc_clk) begin
    adc_valid <= adc_on;
    if (adc_valid) adc_data <= adc_data + 1'b1;
  end

  // ------------------------------------------------------------ mechanism counters
  int to_cnt[6], handover = 0, pauses = 0, act_on = 0, act_off = 0, loop_rx = 0;
  for (genvar g = 0; g < 6; g++) begin : g_cnt
    always @(posedge local_mode[g]) if (rst_n) to_cnt[g]++;
  end
  always @(posedge dut.tra_req) if (local_mode[4]) handover++;
  always @(posedge dut.rx3_req) if (local_mode[5]) handover++;
  always @(posedge dut.tx23_req) if (local_mode[1]) handover++;
  always @(posedge dut.u_aw_tx2.u_lcg.hold) if (local_mode[0]) pauses++;
  always @(posedge dut.u_aw_rxtra.u_lcg.hold) if (local_mode[4]) pauses++;
  always @(posedge act_datapath) act_on++;
  always @(negedge act_datapath) act_off++;
  always @(posedge dut.rxi_req) if (dut.loop_en) loop_rx++;

  // ------------------------------------------------------------ BIST expected values
  function automatic logic [15:0] lfsr_step(input logic [15:0] v);
    return v[0] ? ((v >> 1) ^ 16'hB400) : (v >> 1);
  endfunction
  function automatic logic [31:0] misr(input logic [31:0] s, input logic [31:0] x);
    logic m; m = s[31]; s = s << 1; if (m) s ^= 32'h04C11DB7; return s ^ x;
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [W-1:0] words[$];
    logic [31:0] s1, s2, s3, s4;
    int nsym = 5;   // SIGNAL + 4 data symbols of the 100-byte, 54 Mbps frame
    for (int i = 0; i < int'(N_TDE); i++) exp_sig[i] = '0;
    #1000 rst_n = 0; #100000;
    tx3_q.delete(); tx3_sym.delete(); tx3_tokens = 0; tx3_req_edges = 0; tx3_loc_edges = 0;
    tx3_req_per_sym.delete(); tx3_loc_per_sym.delete(); rx3_q.delete(); rx3_fbq.delete();
    tx3_head_v = 0; rx3_head_v = 0; rx3_fb_head_v = 0;
    fb_exp.delete(); rx1_n = 0; rx2_n = 0; rx3_in_n = 0; fb_prod = 0; fb_cons = 0; mac_got.delete();
    rst_n = 1; #100000;

    // ---- transmitter: 3 symbols
    for (int s = 0; s < nsym; s++) begin
      for (int i = 0; i < 64; i++) dac_exp.push_back(W'(s * 256 + i));
      for (int i = 48; i < 64; i++) dac_exp.push_back(W'(s * 256 + i));
      tx_symbol(s);
      #4_500_000;
    end
    #8_000_000;
    check(dac_n == 80 * nsym && dac_exp.size() == 0, $sformatf("DAC got %0d samples", dac_n));
    check(tx3_req_per_sym.size() == nsym, $sformatf("Tx_3 local phases %0d", tx3_req_per_sym.size()));
    foreach (tx3_req_per_sym[i]) begin
      check(tx3_req_per_sym[i] == 8, $sformatf("Tx_3 symbol %0d: %0d request tokens", i, tx3_req_per_sym[i]));
      check(tx3_loc_per_sym[i] == 72, $sformatf("Tx_3 symbol %0d: %0d local cycles", i, tx3_loc_per_sym[i]));
    end

    // ---- receiver: one frame
    adc_on = 1;
    wait (rx2_frame_done);
    wait (!act_datapath);
    #1_000_000 adc_on = 0;
    #20_000_000;
    $display("Rx chain: Rx_1 %0d, Rx_2 %0d, Rx_3 in %0d, feedback made %0d, feedback used %0d, MAC %0d", rx1_n, rx2_n, rx3_in_n, fb_prod, fb_cons, mac_got.size());
    check(rx1_n >= sync_at, "Rx_1 tracked the input");
    check(rx2_n == frame_len, $sformatf("Rx_2 got %0d samples", rx2_n));
    check(sample_gaps == 0, "Rx_2 samples consecutive");
    check(mac_got.size() == 64 * nsym_rx, $sformatf("MAC got %0d words", mac_got.size()));
    for (int i = 0; i < mac_got.size(); i++)
      if (mac_got[i] != ((W'(sync_at) + W'(pre_left + (i / 64) * 80 + 16 + i % 64)) ^ 16'h5A5A)) begin
        check(0, $sformatf("MAC word %0d = %h", i, mac_got[i])); break;
      end
    check(fb_cons > 0 && fb_bad == 0, $sformatf("feedback consumed %0d, bad %0d", fb_cons, fb_bad));

    // ---- BIST transmitter test (TPG1 -> Tx_2 -> Tx_3 -> Tx_int)
    dac_check = 0;
    words.delete();
    begin
      logic [15:0] r; r = 16'hACE1 + 16'd1;
      for (int i = 0; i < 128; i++) begin words.push_back(r); r = lfsr_step(r); end
    end
    s1 = 0; s2 = 0; s3 = 0; s4 = 0;
    foreach (words[i]) s1 = misr(s1, {16'h0, words[i]});
    for (int t = 0; t < 16; t++) begin
      logic [31:0] f; f = 0;
      for (int k = 0; k < 8; k += 2) f ^= {words[t*8+k+1], words[t*8+k]};
      s2 = misr(s2, f);
    end
    for (int sy = 0; sy < 2; sy++) begin
      for (int i = 0; i < 80; i++) begin
        logic [15:0] v; v = words[sy*64 + (i < 64 ? i : i - 16)];
        s3 = misr(s3, {16'h0, v}); s4 = misr(s4, {16'h0, v});
      end
    end
    exp_sig[1] = s1; exp_sig[2] = s2; exp_sig[3] = s3; exp_sig[4] = s4;
    bist_sel = TEST_TX;
    @(posedge bist_clk); bist_start <= 1; @(posedge bist_clk); bist_start <= 0;
    wait (!bist_done); wait (bist_done);
    check(test_ok, $sformatf("BIST Tx test passes (sig %h %h %h %h)", sig[1], sig[2], sig[3], sig[4]));
    exp_sig[3] = s3 ^ 32'h1;
    @(posedge bist_clk); bist_start <= 1; @(posedge bist_clk); bist_start <= 0;
    wait (!bist_done); wait (bist_done);
    check(!test_ok, "BIST Tx test fails with a wrong expected signature");

    // ---- BIST Rx_3 test (TPG4 -> Rx_3 -> Rx_int), run twice: the
    // signatures must match the values computed here both times, although
    // the free-running local clocks start from different phases.
    begin
      logic [15:0] r; logic [31:0] s7, s10;
      r = 16'hACE1 + 16'd4; s7 = 0; s10 = 0;
      for (int i = 0; i < 128; i++) begin
        s7 = misr(s7, {16'h0, r}); s10 = misr(s10, {16'h0, r ^ 16'h5A5A}); r = lfsr_step(r);
      end
      exp_sig[7] = s7; exp_sig[8] = '0; exp_sig[10] = s10;
    end
    bist_sel = TEST_RX3; bist_num = 16'd128;
    for (int run = 0; run < 2; run++) begin
      #(1_000_000 + run * 333_000);
      @(posedge bist_clk); bist_start <= 1; @(posedge bist_clk); bist_start <= 0;
      wait (!bist_done); wait (bist_done);
      check(test_ok, $sformatf("BIST Rx_3 test run %0d passes (sig %h %h %h)", run, sig[7], sig[8], sig[10]));
    end

    // ---- BIST global test: TPG0 -> Tx_1 model -> transmitter -> loop -> receiver
    tpg0_mode = 1;
    rx1_n = 0; rx2_n = 0; have_last = 0; sync_at = 1000;  // stays in tracking
    bist_sel = TEST_GLOBAL; bist_num = 16'd64;
    @(posedge bist_clk); bist_start <= 1; @(posedge bist_clk); bist_start <= 0;
    wait (!bist_done); wait (bist_done);
    check(!test_ok, "global test reports mismatch against zero signatures");
    check(loop_rx > 0 && rx1_n > 0, $sformatf("internal loop carried %0d tokens into the receiver", loop_rx));
    check(sig[0] != 0 && sig[4] != 0 && sig[5] != 0, "global test extractors recorded data");

    // ---- mechanisms
    for (int g = 0; g < 6; g++) check(to_cnt[g] > 0, $sformatf("time-out/local mode in wrapper %0d", g));
    check(handover > 0, $sformatf("hand-over to request line %0d", handover));
    check(pauses > 0, $sformatf("local clock paused on output %0d", pauses));
    check(act_on > 0 && act_off > 0, "activation interface switched both ways");
    check(fb_prod > 0, "FIFO_TA carried feedback");
    $display("timeouts %0d %0d %0d %0d %0d %0d handover %0d pauses %0d fb %0d loop %0d",
             to_cnt[0], to_cnt[1], to_cnt[2], to_cnt[3], to_cnt[4], to_cnt[5], handover, pauses, fb_cons, loop_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_async_wrapper: self-checking test of the request-driven asynchronous
// wrapper (input port, time-out detection, local clock generation with its
// ring oscillator, output port).
//
// A D-stage valid-tagged pipeline stands in for the LS block (each token
// leaves as data+1). A 4-phase sender drives bursts of tokens; the receiver
// acknowledges at once and checks order and value. Scenarios: a burst
// followed by idle (time-out, exactly D local flush cycles, oscillator
// stops), a short gap below the time-out (no local mode), and a new burst
// arriving in the middle of a flush (hand-over back to the request line).
// A slow receiver then makes the local clock pause and holds off input
// requests while the output port is busy; no token may be lost.
// The delay from the last request to local mode is checked against the
// time-out of TIMEOUT_CYCLES oscillator periods.
`timescale 1ps/1ps
module tb_async_wrapper;
  localparam int W = 16;
  localparam int D = 4;
  localparam int TO = 3;
  localparam int HALF = 6250;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1;
  logic req_in = 1'b0, ack_in, req_out, ack_out;
  logic [W-1:0] data_in = '0, data_out;
  logic lsb_clk, lsb_in_valid, lsb_out_valid, local_mode, pending;
  logic [W-1:0] lsb_data_in, lsb_out_data;

  async_wrapper #(.DIN_W(W), .DOUT_W(W), .TIMEOUT_CYCLES(TO), .LOCAL_CYCLES(D),
                  .OSC_HALF_PS(HALF)) dut (
    .rst_n, .req_in, .ack_in, .data_in, .req_out, .ack_out, .data_out,
    .lsb_clk, .lsb_in_valid, .lsb_data_in, .lsb_out_valid, .lsb_out_data,
    .ext_hold(1'b0), .lsb_out_ready(), .local_mode, .pending);

  // LS block model: D-stage pipeline with valid bits.
  logic [D-1:0] sv;
  logic [W-1:0] sd [D];
  always_ff @(posedge lsb_clk or negedge rst_n) begin
    if (!rst_n) begin
      sv <= '0;
      for (int i = 0; i < D; i++) sd[i] <= '0;
    end else begin
      sv[0] <= lsb_in_valid;
      sd[0] <= lsb_data_in + 1'b1;
      for (int i = 1; i < D; i++) begin
        sv[i] <= sv[i-1];
        sd[i] <= sd[i-1];
      end
    end
  end
  assign lsb_out_valid = sv[D-1];
  assign lsb_out_data  = sd[D-1];

  // Receiver: ordered comparison; acknowledges at once, or SLOW ps after
  // each request when `slow` is set (4-phase: the acknowledge falls right
  // after the request).
  localparam int SLOW = 7 * HALF;
  bit slow = 0;
  logic ack_slow = 1'b0;
  always @(posedge req_out) if (slow) begin #(SLOW); ack_slow = 1'b1; end
  always @(negedge req_out) ack_slow = 1'b0;
  assign ack_out = slow ? ack_slow : req_out;
  logic [W-1:0] expq[$];
  int received = 0;
  always @(posedge req_out) begin
    checks++;
    received++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL: unexpected token %h", data_out);
    end else begin
      logic [W-1:0] e;
      e = expq.pop_front();
      if (data_out !== e) begin
        failures++; $display("FAIL: got %h expected %h", data_out, e);
      end
    end
  end

  // Counters of mechanisms.
  int local_edges = 0, req_edges = 0, local_entries = 0, osc_edges = 0;
  always @(posedge lsb_clk) if (local_mode) local_edges++; else req_edges++;
  always @(posedge local_mode) local_entries++;
  always @(posedge dut.osc) osc_edges++;
  // Pausing: the local clock generator is held while a token waits;
  // blocking: a request arrives while the output port is still busy.
  int pauses = 0, blocked = 0, early_ack = 0;
  always @(posedge dut.u_lcg.hold) if (local_mode) pauses++;
  always @(posedge req_in) if (req_out) blocked++;
  always @(posedge ack_in) if (req_out && !local_mode) early_ack++;

  task automatic send(input logic [W-1:0] d);
    data_in = d;
    expq.push_back(d + 1'b1);
    #1 req_in = 1'b1;
    wait (ack_in);
    #(HALF) req_in = 1'b0;
    wait (!ack_in);
    #(HALF - 1);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(200_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_last, t_local;
    int le, oe;
    #1000 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    #20000;
    // 1: burst then idle -> time-out and a full flush.
    for (int i = 0; i < 10; i++) send(16'h100 + 16'(i));
    t_last = $realtime;
    wait (local_mode);
    t_local = $realtime;
    check(t_local - t_last >= real'((TO - 1) * 2 * HALF) &&
          t_local - t_last <= real'((TO + 1) * 2 * HALF), "time-out delay");
    le = local_edges;
    wait (!local_mode);
    #(10 * HALF);
    check(local_edges - le == D, $sformatf("local flush cycles %0d", local_edges - le));
    check(received == 10 && expq.size() == 0, "burst 1 fully delivered");
    check(!pending, "pipeline marked empty");
    oe = osc_edges;
    #(40 * HALF);
    check(osc_edges == oe, "oscillator stopped when empty");
    check(local_entries == 1, "one local phase");

    // 2: short gap (below the time-out) inside a burst -> no local mode.
    for (int i = 0; i < 5; i++) send(16'h200 + 16'(i));
    #(2 * HALF);
    for (int i = 5; i < 10; i++) send(16'h200 + 16'(i));
    check(local_entries == 1, "no local mode during short gap");
    wait (!pending);
    #(10 * HALF);
    check(received == 20 && expq.size() == 0, "burst 2 fully delivered");
    check(local_entries == 2, "time-out after burst 2");

    // 3: new request during the flush -> hand-over back to request clock.
    for (int i = 0; i < 6; i++) send(16'h300 + 16'(i));
    wait (local_mode);
    wait (local_edges > 0);
    le = local_edges;
    #(3 * HALF);
    for (int i = 0; i < 6; i++) send(16'h400 + 16'(i));
    check(local_entries == 2 || local_entries == 3, "hand-over during flush");
    wait (!pending);
    #(10 * HALF);
    check(received == 32 && expq.size() == 0, "interrupted flush delivered all tokens");
    check(local_entries == 4, $sformatf("local phases %0d", local_entries));

    // 4: slow receiver -> the local clock pauses while a token waits, and
    // new requests are not taken while the output port is busy.
    slow = 1;
    for (int i = 0; i < 8; i++) send(16'h500 + 16'(i));
    wait (!pending);
    wait (!req_out);
    #(20 * HALF);
    slow = 0;
    check(received == 40 && expq.size() == 0, $sformatf("slow receiver: %0d tokens, %0d missing", received, expq.size()));
    check(pauses > 0, $sformatf("local clock paused %0d times", pauses));
    check(blocked > 0, $sformatf("requests held off %0d times", blocked));
    check(early_ack == 0, "no input acknowledged while the output was busy");
    $display("req_edges=%0d local_edges=%0d local_entries=%0d", req_edges, local_edges, local_entries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_token_rate_adapter: self-checking test of the burst rate adapter with
// the Tx_2 configuration (64 words in, 8 tokens of 8 words out).
//
// Words arrive at a fast rate (one per clock edge) for two symbols in a
// row, then clock edges without input (the local clock). Each symbol must
// leave as exactly 8 packed tokens on consecutive edges, starting on the
// first edge after its last word, with the words in order.
`timescale 1ps/1ps
module tb_token_rate_adapter;
  localparam int W = 16, BW = 64, OW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1'b1, in_valid = 0, out_valid, out_ready = 1;
  logic [W-1:0] in_data = 0;
  logic [OW*W-1:0] out_data;

  token_rate_adapter #(.W(W), .BURST_WORDS(BW), .OUT_WORDS(OW)) dut (
    .clk, .rst_n, .in_valid, .in_data, .out_ready, .out_valid, .out_data);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    #100_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int edge_no = 0, ntok = 0, first_edge[2];
  logic [W-1:0] nextw = 0;
  always @(posedge clk) begin
    edge_no++;
    #1;
    if (out_valid) begin
      for (int k = 0; k < OW; k++) begin
        check(out_data[k*W +: W] == nextw, $sformatf("word %0d got %h", nextw, out_data[k*W +: W]));
        nextw++;
      end
      if (ntok % 8 == 0) first_edge[ntok / 8] = edge_no;
      ntok++;
    end
  end

  task automatic tick(input bit v, input logic [W-1:0] d);
    in_valid = v; in_data = d; #3125 clk = 1; #3125 clk = 0;
  endtask

  initial begin
    #100 rst_n = 0; #100 rst_n = 1;
    for (int i = 0; i < 2 * BW; i++) tick(1, W'(i));   // edges 1..128
    for (int i = 0; i < 20; i++) tick(0, '0);
    check(ntok == 16, $sformatf("16 tokens for two symbols, got %0d", ntok));
    check(first_edge[0] == BW + 1, $sformatf("first symbol starts at edge %0d", first_edge[0]));
    check(first_edge[1] == 2 * BW + 1, $sformatf("second symbol starts at edge %0d", first_edge[1]));
    // Back-pressure: a third symbol with out_ready low on alternate edges.
    for (int i = 0; i < BW; i++) tick(1, W'(2 * BW + i));
    for (int i = 0; i < 20; i++) begin out_ready = i[0]; tick(0, '0); end
    out_ready = 1;
    check(ntok == 24, $sformatf("third symbol under back-pressure, %0d tokens", ntok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

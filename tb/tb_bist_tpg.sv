// tb_bist_tpg: self-checking test of the BIST pattern generator.
//
// A 4-phase receiver with random acknowledge delays takes the words. The
// test checks the word count and done flag, the init pulse, that the
// preamble part repeats with period PRE_PERIOD, and that the random part
// equals an independently written Galois LFSR sequence from the seed. A
// second run without preamble must start with the seed.
`timescale 1ps/1ps
module tb_bist_tpg;
  localparam int PP = 16, PW = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1'b1, start = 0, pre_en = 1, req_out, ack_out = 0, init, busy, done;
  logic [15:0] num = 16'd50, dout;

  bist_tpg #(.W(16), .POLY(16'hB400), .SEED(16'hACE1), .PRE_PERIOD(PP), .PRE_WORDS(PW)) dut (
    .clk, .rst_n, .start, .preamble_en(pre_en), .num_words(num), .req_out, .ack_out,
    .data_out(dout), .init, .busy, .done);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    #100_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always #5000 clk = ~clk;

  logic [15:0] words[$];
  always @(posedge req_out) begin
    words.push_back(dout);
    #($urandom_range(1000, 30000)) ack_out = 1;
    wait (!req_out);
    #($urandom_range(1000, 30000)) ack_out = 0;
  end
  int inits = 0;
  always @(posedge clk) if (init) inits++;

  function automatic logic [15:0] ref_step(input logic [15:0] v);
    logic lsb;
    lsb = v[0];
    v = {1'b0, v[15:1]};
    if (lsb) v = v ^ 16'hB400;
    return v;
  endfunction

  initial begin
    logic [15:0] r;
    #100 rst_n = 0; #100 rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (!done); wait (done); #100000;
    check(words.size() == 50, $sformatf("50 words, got %0d", words.size()));
    check(inits == 1, "one init pulse");
    check(!busy, "idle after done");
    for (int i = 0; i + PP < PW; i++) check(words[i] == words[i+PP], "preamble periodic");
    check(words[0] != words[1], "preamble not constant");
    r = 16'hACE1;
    for (int i = PW; i < 50; i++) begin
      check(words[i] == r, $sformatf("random word %0d %h vs %h", i, words[i], r));
      r = ref_step(r);
    end
    words.delete();
    pre_en = 0; num = 16'd5;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (!done); wait (done); #100000;
    check(words.size() == 5 && words[0] == 16'hACE1 && words[1] == ref_step(16'hACE1),
          "no-preamble run starts with seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

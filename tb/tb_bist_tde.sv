// tb_bist_tde: self-checking test of the test data extractor. A 16-bit and
// a 40-bit extractor record random tokens; signatures and counts are
// compared with an independent MISR model. Tokens while `en` is low must
// be ignored, and `clear` must reset the signature.
`timescale 1ps/1ps
module tb_bist_tde;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clear = 0, en = 0, strobe = 0;
  logic [39:0] d = 0;
  logic [31:0] s16, s40;
  logic [15:0] c16, c40;

  bist_tde #(.W(16)) u16 (.rst_n, .clear, .en, .strobe, .data(d[15:0]), .signature(s16), .count(c16));
  bist_tde #(.W(40)) u40 (.rst_n, .clear, .en, .strobe, .data(d), .signature(s40), .count(c40));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    #10_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] ref_misr(input logic [31:0] s, input logic [31:0] x);
    logic msb;
    msb = s[31];
    s = s << 1;
    if (msb) s = s ^ 32'h04C11DB7;
    return s ^ x;
  endfunction

  task automatic tok(input logic [39:0] v);
    d = v; #1000 strobe = 1; #1000 strobe = 0; #1000;
  endtask

  initial begin
    logic [31:0] e16, e40;
    #100 rst_n = 0; #100 rst_n = 1;
    tok(40'h12_3456_789A);
    check(s16 == 0 && c16 == 0, "ignored while disabled");
    en = 1; e16 = 0; e40 = 0;
    for (int i = 0; i < 40; i++) begin
      logic [39:0] v;
      v = {8'($urandom), 32'($urandom)};
      tok(v);
      e16 = ref_misr(e16, {16'h0, v[15:0]});
      e40 = ref_misr(e40, v[31:0] ^ {24'h0, v[39:32]});
    end
    check(s16 == e16, $sformatf("16-bit signature %h vs %h", s16, e16));
    check(s40 == e40, $sformatf("40-bit signature %h vs %h", s40, e40));
    check(c16 == 40 && c40 == 40, "token count");
    clear = 1; #100 clear = 0;
    check(s16 == 0 && c40 == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

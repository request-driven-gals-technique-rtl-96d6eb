// tb_async_join: self-checking test of the 4-phase join.
//
// Two senders with independent random delays feed channels a and b; the
// joined request may only rise when both inputs request and only fall when
// both have released, and the joined data must be {b, a} of the same token
// pair. A second phase disables channel b and checks that channel a passes
// alone while b sees no acknowledge.
`timescale 1ps/1ps
module tb_async_join;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, b_en = 1'b1;
  logic req_a = 0, req_b = 0, ack_a, ack_b, req_out, ack_out = 0;
  logic [15:0] da = 0, db = 0;
  logic [31:0] dout;

  async_join #(.WA(16), .WB(16)) dut (.rst_n, .b_en, .req_a, .ack_a, .data_a(da),
    .req_b, .ack_b, .data_b(db), .req_out, .ack_out, .data_out(dout));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #5_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Receiver: acknowledge after a delay, check data and rule.
  int got = 0;
  always @(posedge req_out) begin
    check(req_a && (!b_en || req_b), "joined request only when both request");
    check(dout[15:0] == 16'(got * 3) && (!b_en || dout[31:16] == 16'(got * 5)),
          $sformatf("joined data %h at token %0d", dout, got));
    got++;
    #($urandom_range(50, 500)) ack_out = 1;
    wait (!req_out);
    #($urandom_range(50, 500)) ack_out = 0;
  end
  always @(negedge req_out) check(!req_a && (!b_en || !req_b), "joined request falls only when both release");

  initial begin
    #100 rst_n = 0; #100 rst_n = 1;
    fork
      for (int i = 0; i < 20; i++) begin
        #($urandom_range(10, 800)); da = 16'(i * 3); req_a = 1; wait (ack_a);
        #($urandom_range(10, 300)); req_a = 0; wait (!ack_a);
      end
      for (int i = 0; i < 20; i++) begin
        #($urandom_range(10, 800)); db = 16'(i * 5); req_b = 1; wait (ack_b);
        #($urandom_range(10, 300)); req_b = 0; wait (!ack_b);
      end
    join
    #1000 check(got == 20, "20 joined tokens");
    b_en = 0;
    for (int i = 20; i < 30; i++) begin
      #200; da = 16'(i * 3); req_a = 1; wait (ack_a);
      check(!ack_b, "no acknowledge on disabled channel");
      #100; req_a = 0; wait (!ack_a);
    end
    #1000 check(got == 30, "channel a alone passes when b disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

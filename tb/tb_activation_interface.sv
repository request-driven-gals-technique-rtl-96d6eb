// tb_activation_interface: self-checking test of the receiver token
// multiplexer. A 20 MHz gated sample clock is the request. Tokens go to
// Rx_1 until sync_found, then to Rx_2 until frame_done; no token may reach
// both outputs and none may be lost across a switch.
`timescale 1ps/1ps
module tb_activation_interface;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk = 0, sync_found = 0, frame_done = 0;
  logic req_rx1, req_rx2, ack_in, sel;
  logic [15:0] din = 0, dout;
  int n1 = 0, n2 = 0, n = 0;

  activation_interface #(.W(16)) dut (.rst_n, .req_in(clk), .ack_in, .data_in(din),
    .sync_found, .frame_done, .req_rx1, .ack_rx1(req_rx1), .req_rx2, .ack_rx2(req_rx2),
    .data_out(dout), .sel_datapath(sel));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    #20_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always #25000 clk = ~clk;
  always @(posedge clk) begin
    n++;
    check(req_rx1 ^ req_rx2, "exactly one output requests");
    check(ack_in, "acknowledge from selected output");
    check(dout == din, "data passed");
  end
  always @(posedge req_rx1) n1++;
  always @(posedge req_rx2) n2++;
  always @(negedge clk) din <= din + 1'b1;

  initial begin
    #100 rst_n = 0; #100 rst_n = 1;
    repeat (10) @(posedge clk);
    #1;
    check(n1 == 10 && n2 == 0, "tracking after reset");
    #7000 sync_found = 1;
    @(posedge clk); #1 sync_found = 0;
    repeat (20) @(posedge clk);
    #1;
    check(n2 == 21 && sel, "datapath after sync_found");
    #7000 frame_done = 1;
    @(posedge clk); #1 frame_done = 0;
    repeat (5) @(posedge clk);
    #1;
    check(!sel && n1 == 16, $sformatf("back to tracking (n1=%0d n2=%0d)", n1, n2));
    check(n1 + n2 == n, "no token lost or duplicated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_pipeline_sync: self-checking test of the async-to-sync interface.
//
// An asynchronous producer writes bursts of words at 80 Msps through a
// 4-phase channel; the consumer runs at 20 MHz. All words must come out in
// order, one per consumer cycle while available, and the first word of an
// idle buffer must appear SYNC_STAGES+1 to SYNC_STAGES+2 cycles after it
// was written.
`timescale 1ps/1ps
module tb_pipeline_sync;
  localparam int S = 2;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, clk = 0, req_in = 0, ack_in, out_valid;
  logic [15:0] din = 0, dout;

  pipeline_sync #(.W(16), .DEPTH(8), .SYNC_STAGES(S)) dut (.rst_n, .req_in, .ack_in,
    .data_in(din), .clk, .out_valid, .out_data(dout));

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    #50_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always #25000 clk = ~clk;
  int nout = 0, cyc = 0, first_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    #1;
    if (out_valid) begin
      check(dout == 16'h7000 + 16'(nout), $sformatf("out %h expected %h", dout, 16'h7000 + 16'(nout)));
      if (nout == 0) first_cyc = cyc;
      nout++;
    end
  end

  task automatic put(input logic [15:0] d);
    din = d; #1000 req_in = 1; wait (ack_in); #5250 req_in = 0; #6250;
  endtask

  initial begin
    int wcyc;
    #100 rst_n = 0; #100 rst_n = 1;
    @(posedge clk); #2000;
    wcyc = cyc;
    put(16'h7000);
    #400000;
    check(first_cyc - wcyc >= S + 1 && first_cyc - wcyc <= S + 2,
          $sformatf("latency %0d cycles", first_cyc - wcyc));
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 4; i++) put(16'h7001 + 16'(b * 4 + i));
      #200000;
    end
    #200000;
    check(nout == 17, $sformatf("17 words out, got %0d", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

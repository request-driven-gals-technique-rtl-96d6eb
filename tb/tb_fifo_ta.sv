// tb_fifo_ta: self-checking test of the asynchronous rate adaptation FIFO.
//
// A fast writer (12.5 ns per token) pushes bursts of 6 words; a slow 4-phase
// reader (about 50 ns per token) drains them. Order and values are
// compared, the FIFO must report full after DEPTH unread writes and empty
// after draining, and the write acknowledge must follow the request at
// once.
`timescale 1ps/1ps
module tb_fifo_ta;
  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic rst_n = 1'b1, req_in = 0, ack_in, req_out, ack_out = 0, empty, full;
  logic [15:0] din = 0, dout;

  fifo_ta #(.W(16), .DEPTH(DEPTH)) dut (.rst_n, .req_in, .ack_in, .data_in(din),
    .req_out, .ack_out, .data_out(dout), .empty, .full);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    #50_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic put(input logic [15:0] d);
    din = d; #1000 req_in = 1; #10 check(ack_in, "fast write acknowledge");
    #5240 req_in = 0; #6250;
  endtask

  int nread = 0;
  task automatic get();
    wait (req_out);
    check(dout == 16'h5000 + 16'(nread), $sformatf("read %h expected %h", dout, 16'h5000 + 16'(nread)));
    nread++;
    #20000 ack_out = 1; #10 check(!req_out, "request drops on acknowledge");
    #5000 ack_out = 0; #20000;
  endtask

  initial begin
    #100 rst_n = 0; #100 rst_n = 1; #100;
    check(empty && !req_out, "empty after reset");
    for (int i = 0; i < DEPTH; i++) put(16'h5000 + 16'(i));
    check(full, "full after DEPTH writes");
    for (int i = 0; i < DEPTH; i++) get();
    #100 check(empty && !full, "empty after draining");
    fork
      for (int i = DEPTH; i < DEPTH + 24; i++) begin
        put(16'h5000 + 16'(i));
        if (i % 6 == 5) #150000;
      end
      for (int i = 0; i < 24; i++) get();
    join
    check(nread == DEPTH + 24, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

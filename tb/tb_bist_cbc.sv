// tb_bist_cbc: self-checking test of the central BIST controller. For each
// of the five tests a model pattern generator finishes some cycles after
// its start pulse; the model extractors hold fixed signatures. The test
// checks the TPG/TDE/loop selection per test, that test_ok is set when the
// observed signatures match and cleared when one observed signature is
// wrong, that a wrong signature outside the test's set does not matter,
// the settle time, and the time-out when no generator finishes.
`timescale 1ps/1ps
module tb_bist_cbc;
  import gals_pkg::*;
  localparam int SETTLE = 20, MAXC = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1'b1, start = 0;
  test_e sel = TEST_GLOBAL;
  logic [SIG_W-1:0] exp_sig [N_TDE], tde_sig [N_TDE];
  logic [N_TPG-1:0] tpg_done = '0, tpg_start, tpg_sel;
  logic [N_TDE-1:0] tde_en;
  logic tde_clear, loop_en, busy, done, test_ok;

  bist_cbc #(.SETTLE_CYCLES(SETTLE), .MAX_CYCLES(MAXC)) dut (.clk, .rst_n, .start, .test_sel(sel),
    .exp_sig, .tde_sig, .tpg_done, .tpg_start, .tpg_sel, .tde_en, .tde_clear, .loop_en,
    .busy, .done, .test_ok);

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  initial begin
    #100_000_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always #5000 clk = ~clk;

  bit tpg_alive = 1;
  int cyc = 0, start_cyc = 0, done_cyc = 0;
  always @(posedge clk) cyc++;
  // Model TPGs: done 30 cycles after start.
  always @(posedge clk) if (tpg_start != 0) begin
    tpg_done <= '0;
    start_cyc = cyc;
    if (tpg_alive) fork begin repeat (30) @(posedge clk); tpg_done <= tpg_sel; done_cyc = cyc; end join_none
  end

  task automatic run(input test_e t, output logic ok, output int dur);
    int t0;
    sel = t;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    t0 = cyc;
    wait (!done); wait (done); @(posedge clk);
    ok = test_ok; dur = cyc - t0;
  endtask

  logic [4:0]  tpgm [5] = '{5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b10000};
  logic [10:0] tdem [5] = '{11'h7FF, 11'h01E, 11'h7E0, 11'h7C0, 11'h580};

  initial begin
    logic ok; int dur;
    for (int i = 0; i < int'(N_TDE); i++) begin
      exp_sig[i] = 32'h1000 + i; tde_sig[i] = 32'h1000 + i;
    end
    #100 rst_n = 0; #100 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      run(test_e'(t), ok, dur);
      check(ok, $sformatf("test %0d passes with matching signatures", t));
      check(tpg_sel == tpgm[t] && tde_en == tdem[t], $sformatf("test %0d selection", t));
      check(loop_en == (t == 0), $sformatf("test %0d loop", t));
      check(dur >= 30 + SETTLE && dur <= 30 + SETTLE + 8, $sformatf("test %0d duration %0d", t, dur));
    end
    tde_sig[3] = 32'hDEAD;          // observed by global and tx tests only
    run(TEST_TX, ok, dur);   check(!ok, "tx test fails on TDE3 mismatch");
    run(TEST_RX, ok, dur);   check(ok,  "rx test ignores TDE3");
    tde_sig[3] = 32'h1003;
    tpg_alive = 0;
    run(TEST_RX3, ok, dur);
    check(!ok && dur >= MAXC, "time-out when the generator never finishes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// bist_cbc: central BIST controller.
//
// Runs one of five tests, chosen by `test_sel`, from the external tester
// clock, so every BIST pin it drives is cycle-deterministic. A test goes
// through: clear all test data extractors (TDEs); select the pattern
// generator (TPG) of the test, route the channel it drives to it and, for
// the global test, close the internal transmitter-to-receiver loop; pulse
// that TPG's start; wait for its done; wait SETTLE_CYCLES more cycles so
// the asynchronous pipelines drain; compare the signatures of the TDEs that
// the test observes with the expected values `exp_sig`; and report `done`
// with `test_ok`. A test whose TPG does not finish within MAX_CYCLES fails.
// Routing stays in place after `done` so the tester can read the results.
//
//   test          TPG   observed TDEs   loop
//   global        0     0..10           on
//   transmitter   1     1..4            off
//   receiver      2     5..10           off
//   rx feedback   3     6..10           off
//   Rx_3          4     7, 8, 10        off
//
// Follows the document: a central controller driven by an external clock
// that runs the global and the four local tests and reports Test_OK. Own
// choice: the table above, the settle time and the comparison with
// expected signatures supplied from outside.
`timescale 1ps/1ps
module bist_cbc #(
  parameter int unsigned SETTLE_CYCLES = 4096,
  parameter int unsigned MAX_CYCLES    = 1_000_000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  gals_pkg::test_e            test_sel,
  input  logic [gals_pkg::SIG_W-1:0] exp_sig  [gals_pkg::N_TDE],
  input  logic [gals_pkg::SIG_W-1:0] tde_sig  [gals_pkg::N_TDE],
  input  logic [gals_pkg::N_TPG-1:0] tpg_done,
  output logic [gals_pkg::N_TPG-1:0] tpg_start,
  output logic [gals_pkg::N_TPG-1:0] tpg_sel,
  output logic [gals_pkg::N_TDE-1:0] tde_en,
  output logic                       tde_clear,
  output logic                       loop_en,
  output logic                       busy,
  output logic                       done,
  output logic                       test_ok
);
  import gals_pkg::*;
  typedef enum logic [2:0] {C_IDLE, C_CLEAR, C_START, C_RUN, C_SETTLE, C_CMP, C_DONE} cstate_e;
  cstate_e state;
  logic [31:0] timer;
  logic [N_TPG-1:0] tpg_m;
  logic [N_TDE-1:0] tde_m;
  logic             loop_m;
  logic             all_eq;

  always_comb begin
    unique case (test_sel)
      TEST_GLOBAL:  begin tpg_m = 5'b00001; tde_m = 11'b111_1111_1111; loop_m = 1'b1; end
      TEST_TX:      begin tpg_m = 5'b00010; tde_m = 11'b000_0001_1110; loop_m = 1'b0; end
      TEST_RX:      begin tpg_m = 5'b00100; tde_m = 11'b111_1110_0000; loop_m = 1'b0; end
      TEST_RX_LOOP: begin tpg_m = 5'b01000; tde_m = 11'b111_1100_0000; loop_m = 1'b0; end
      TEST_RX3:     begin tpg_m = 5'b10000; tde_m = 11'b101_1000_0000; loop_m = 1'b0; end
      default:      begin tpg_m = '0;       tde_m = '0;              loop_m = 1'b0; end
    endcase
  end

  always_comb begin
    all_eq = 1'b1;
    for (int i = 0; i < int'(N_TDE); i++)
      if (tde_en[i] && (tde_sig[i] != exp_sig[i])) all_eq = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      timer     <= '0;
      tpg_start <= '0;
      tpg_sel   <= '0;
      tde_en    <= '0;
      tde_clear <= 1'b0;
      loop_en   <= 1'b0;
      done      <= 1'b0;
      test_ok   <= 1'b0;
    end else begin
      tpg_start <= '0;
      tde_clear <= 1'b0;
      unique case (state)
        C_IDLE, C_DONE: if (start) begin
          done      <= 1'b0;
          test_ok   <= 1'b0;
          tpg_sel   <= tpg_m;
          tde_en    <= '0;
          loop_en   <= loop_m;
          tde_clear <= 1'b1;
          state     <= C_CLEAR;
        end
        C_CLEAR: begin
          tde_en <= tde_m;
          state  <= C_START;
        end
        C_START: begin
          tpg_start <= tpg_sel;
          timer     <= '0;
          state     <= C_RUN;
        end
        C_RUN: begin
          timer <= timer + 1'b1;
          if ((tpg_done & tpg_sel) == tpg_sel && timer > 1) begin
            timer <= '0;
            state <= C_SETTLE;
          end else if (timer == MAX_CYCLES) begin
            done  <= 1'b1;
            state <= C_DONE;
          end
        end
        C_SETTLE: begin
          timer <= timer + 1'b1;
          if (timer == SETTLE_CYCLES) state <= C_CMP;
        end
        C_CMP: begin
          test_ok <= all_eq;
          done    <= 1'b1;
          state   <= C_DONE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE) && (state != C_DONE);
endmodule

// bist_tpg: BIST test pattern generator with a 4-phase handshake output.
//
// A test pattern generator sits between two asynchronous wrappers and feeds
// test tokens into the downstream one. It is an LFSR with extra logic: on
// `start` it first emits PRE_WORDS words of a periodic synchronization
// pattern (when `preamble_en` is set), so that receiver blocks behind the
// tracking synchronizer see a frame start, and then pseudo-random words
// until `num_words` words have been sent in total. `init` pulses for one
// cycle at the start; it initialises the transmitter in the global test.
//
// Each word is sent with a full 4-phase handshake: data set up, `req_out`
// raised, wait for `ack_out`, `req_out` dropped, wait for `ack_out` low. The
// acknowledge is synchronized with two flip-flops, so one word takes about
// six clock cycles. The generator runs from the tester clock and so is
// cycle-deterministic on its own side.
//
// Follows the document: LFSR-based TPGs with added logic for non-random
// vectors, preamble first and then random data, handshake support, and a
// word count set for the global test. Own choice: the pattern itself (the
// period-PRE_PERIOD sequence stands in for the real synchronization
// sequence), the polynomial and the handshake timing.
`timescale 1ps/1ps
module bist_tpg #(
  parameter int unsigned      W          = 16,
  parameter logic [W-1:0]     POLY       = 16'hB400,  // x^16+x^14+x^13+x^11+1
  parameter logic [W-1:0]     SEED       = 16'hACE1,
  parameter int unsigned      PRE_PERIOD = 16,
  parameter int unsigned      PRE_WORDS  = 160
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         preamble_en,
  input  logic [15:0]  num_words,
  output logic         req_out,
  input  logic         ack_out,
  output logic [W-1:0] data_out,
  output logic         init,
  output logic         busy,
  output logic         done
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_REL, S_NEXT} state_e;
  state_e        state;
  logic [W-1:0]  lfsr;
  logic [15:0]   sent;
  logic [1:0]    ack_s;
  logic [$clog2(PRE_PERIOD)-1:0] pidx;

  function automatic logic [W-1:0] step(input logic [W-1:0] v);
    return v[0] ? ((v >> 1) ^ POLY) : (v >> 1);
  endfunction

  // Periodic pattern word: a fixed function of the position in the period.
  function automatic logic [W-1:0] pre_word(input int unsigned i);
    logic [W-1:0] v;
    v = ~SEED;
    for (int k = 0; k <= int'(i); k++) v = step(v);
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_s <= '0;
    else        ack_s <= {ack_s[0], ack_out};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      lfsr     <= SEED;
      sent     <= '0;
      pidx     <= '0;
      req_out  <= 1'b0;
      data_out <= '0;
      init     <= 1'b0;
      done     <= 1'b0;
    end else begin
      init <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          init  <= 1'b1;
          done  <= 1'b0;
          sent  <= '0;
          pidx  <= '0;
          lfsr  <= SEED;
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (sent == num_words) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            if (preamble_en && sent < 16'(PRE_WORDS)) begin
              data_out <= pre_word(int'(pidx));
              pidx     <= (pidx == $bits(pidx)'(PRE_PERIOD - 1)) ? '0 : pidx + 1'b1;
            end else begin
              data_out <= lfsr;
              lfsr     <= step(lfsr);
            end
            state <= S_REQ;
          end
        end
        S_REQ: begin
          req_out <= 1'b1;
          if (req_out && ack_s[1]) begin
            req_out <= 1'b0;
            state   <= S_REL;
          end
        end
        S_REL: if (!ack_s[1]) begin
          sent  <= sent + 1'b1;
          state <= S_NEXT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule

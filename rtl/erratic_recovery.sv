// Erratic-bit recovery sequencer.
//
// Runs the detect-and-recover sequence on one register Rx after a read of Rx
// failed its parity check, using four word latches named as in the flow:
//   A = Rx as read           (state RD_A)
//   check A's parity         (state CHK): no error -> result REC_OK, D = A
//   B = NOT(A), write B to Rx (state WR_B)
//   C = Rx as re-read        (state RD_C)
//   D = NOT(C), E = XNOR(A, C) (state EVAL)
// A stuck cell ignores the write of B, so C is the original word inverted in
// every bit: D is the original word (parity bit included) and E has a 1
// exactly at the stuck bit -> REC_ERRATIC. A soft error is overwritten by
// B, so C = B, E = 0 -> REC_SOFT, no recovery. If the cell stops being stuck
// before B is written, the sequence reports REC_SOFT as well.
// Words are raw (W+1)-bit {parity, value}; parity is never recomputed.
//
// Interface: pulse start with reg_idx while busy is low. The sequencer owns
// the register file's read address and write port while busy is high. The
// read is combinational (rf_rd_word belongs to rf_rd_addr in the same
// cycle). done pulses for one cycle in state DONE together with result,
// d_word and e_word, which then hold until the next start.
// Latency: done rises 6 cycles after start, 3 cycles after start when A
// passes its check. The flow and the latch names follow the published scheme;
// one state per step is this design's choice.
module erratic_recovery
  import erratic_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] reg_idx,
  output logic          busy,
  output logic          done,
  output rec_result_t   result,
  output logic [W:0]    d_word,      // recovered word (valid for REC_ERRATIC / REC_OK)
  output logic [W:0]    e_word,      // 1 at the stuck bit position(s)
  output logic [AW-1:0] rx,          // register under recovery
  // register file port
  output logic [AW-1:0] rf_rd_addr,
  input  logic [W:0]    rf_rd_word,
  output logic          rf_wr_en,
  output logic [AW-1:0] rf_wr_addr,
  output logic [W:0]    rf_wr_word
);

  typedef enum logic [2:0] {S_IDLE, S_RD_A, S_CHK, S_WR_B, S_RD_C, S_EVAL, S_DONE} state_t;
  state_t state;

  logic [W:0] a_q, b_q, c_q;
  logic       chk_err;

  parity_check #(.W(W)) u_chk (.word(a_q), .error(chk_err));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rx     <= '0;
      a_q    <= '0;
      b_q    <= '0;
      c_q    <= '0;
      d_word <= '0;
      e_word <= '0;
      result <= REC_NONE;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          rx    <= reg_idx;
          state <= S_RD_A;
        end
        S_RD_A: begin
          a_q   <= rf_rd_word;
          state <= S_CHK;
        end
        S_CHK: begin
          if (!chk_err) begin
            d_word <= a_q;
            e_word <= '0;
            result <= REC_OK;
            state  <= S_DONE;
          end else begin
            b_q   <= ~a_q;
            state <= S_WR_B;
          end
        end
        S_WR_B: state <= S_RD_C;
        S_RD_C: begin
          c_q   <= rf_rd_word;
          state <= S_EVAL;
        end
        S_EVAL: begin
          d_word <= ~c_q;
          e_word <= ~(a_q ^ c_q);
          result <= (~(a_q ^ c_q) != '0) ? REC_ERRATIC : REC_SOFT;
          state  <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy       = (state != S_IDLE);
    done       = (state == S_DONE);
    rf_rd_addr = rx;
    rf_wr_en   = (state == S_WR_B);
    rf_wr_addr = rx;
    rf_wr_word = b_q;
  end

endmodule

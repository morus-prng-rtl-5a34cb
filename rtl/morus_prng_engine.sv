// MORUS PRNG Engine: pseudo-random numbers from MORUS-1280-128 in counter mode.
//
// Two operations, started by a one-cycle start pulse while the engine is idle:
//  * Initialize (op_gen = 0): the state is loaded from the key (four 32-bit
//    words read from the register file), the hard-coded IV and the MORUS
//    constants, then 16 StateUpdates with a zero message are run, one per
//    cycle, and the key is folded into S1 on the last one. The internal
//    128-bit counter is cleared.
//  * Generate (op_gen = 1): n_words (register N) is the amount of 32-bit
//    numbers wanted. If it exceeds the output buffer capacity, or the engine
//    was never initialized, the operation ends at once with error. Otherwise
//    the counter value at the start is saved, and each cycle the counter is
//    encrypted as one plaintext block: the low 128 bits of the ciphertext
//    (four numbers, number 0 in bits [31:0]) are written to buffer line
//    (counter - saved start), the counter is mixed into the state with a
//    StateUpdate and then incremented. Generation stops once
//    counter - start reaches ceil(N/4).
// The counter and the cipher state survive a Generate, so later calls
// continue the sequence; only Initialize restarts it.
//
// Timing: Initialize keeps busy high for 16 cycles; Generate for ceil(N/4)
// cycles, one 128-bit line per cycle. done (with error) pulses the cycle
// after busy falls; a rejected Generate pulses done/error the cycle after
// start without ever raising busy.
//
// Follows the document: the two operations, the hard-coded IV, no associated
// data and no finalization, the 128-bit counter cleared only by Initialize,
// the ceil(N/4) stop rule, the capacity check and output from address 0.
// This design's choices: one StateUpdate per cycle; the counter is placed
// zero-extended in the 256-bit MORUS-1280 plaintext block and only its 128
// low ciphertext bits are kept; the IV value (a parameter, zero by default);
// the error on a Generate before any Initialize.
module morus_prng_engine
  import morus_pkg::*;
#(
  parameter int unsigned  BUF_WORDS = 262144,   // output buffer capacity in 32-bit words
  parameter logic [127:0] IV        = '0,
  localparam int unsigned LINES     = BUF_WORDS / 4,
  localparam int unsigned LINE_AW   = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // command
  input  logic                start,
  input  logic                op_gen,       // 0: Initialize, 1: Generate
  input  logic [3:0][31:0]    key,          // K0..K3
  input  logic [31:0]         n_words,      // N
  output logic                busy,
  output logic                done,
  output logic                error,
  output logic                initialized,
  // output buffer write port, one 128-bit line per cycle
  output logic                wr_en,
  output logic [LINE_AW-1:0]  wr_line,
  output logic [127:0]        wr_data
);

  typedef enum logic [1:0] {E_IDLE, E_INIT, E_GEN} eng_state_e;

  eng_state_e     st;
  state_t         s;
  logic [127:0]   ctr, ctr_start;
  logic [30:0]    target;         // ceil(N/4)
  logic [3:0]     init_cnt;

  state_t         su_out;
  blk_t           msg;
  logic [127:0]   diff, diff_next;
  blk_t           kk, kk_q;      // key as K || K, and its copy taken at start

  assign kk        = {key[3], key[2], key[1], key[0], key[3], key[2], key[1], key[0]};
  assign msg       = (st == E_GEN) ? {128'd0, ctr} : '0;
  assign diff      = ctr - ctr_start;
  assign diff_next = diff + 128'd1;

  morus_state_update u_su (.s_in(s), .msg(msg), .s_out(su_out));

  assign busy    = (st != E_IDLE);
  assign wr_en   = (st == E_GEN);
  assign wr_line = diff[LINE_AW-1:0];
  assign wr_data = keystream(s)[127:0] ^ ctr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= E_IDLE;
      s           <= '0;
      kk_q        <= '0;
      ctr         <= '0;
      ctr_start   <= '0;
      target      <= '0;
      init_cnt    <= '0;
      done        <= 1'b0;
      error       <= 1'b0;
      initialized <= 1'b0;
    end else begin
      done  <= 1'b0;
      error <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          if (!op_gen) begin
            s[0]     <= {128'd0, IV};
            s[1]     <= kk;
            kk_q     <= kk;
            s[2]     <= '1;
            s[3]     <= '0;
            s[4]     <= CONST_S4;
            ctr      <= '0;
            init_cnt <= '0;
            st       <= E_INIT;
          end else if (!initialized || n_words > BUF_WORDS) begin
            done  <= 1'b1;
            error <= 1'b1;
          end else if (n_words == 0) begin
            done <= 1'b1;
          end else begin
            ctr_start <= ctr;
            target    <= 31'((n_words + 32'd3) >> 2);
            st        <= E_GEN;
          end
        end
        E_INIT: begin
          init_cnt <= init_cnt + 4'd1;
          if (init_cnt == 4'(INIT_STEPS - 1)) begin
            s           <= su_out;
            s[1]        <= su_out[1] ^ kk_q;
            initialized <= 1'b1;
            done        <= 1'b1;
            st          <= E_IDLE;
          end else begin
            s <= su_out;
          end
        end
        E_GEN: begin
          s   <= su_out;
          ctr <= ctr + 128'd1;
          if (diff_next >= {97'd0, target}) begin
            done <= 1'b1;
            st   <= E_IDLE;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  // A start is only honoured while idle; the controller must wait for it.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("engine started while busy");

endmodule

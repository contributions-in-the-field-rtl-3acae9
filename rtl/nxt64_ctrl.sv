// nxt64_ctrl: control unit of the iterative IDEA NXT64 core. It counts the rounds so
// that rounds 1..r-1 use the orthomorphism round (lmor64 when encrypting, lmio64 when
// decrypting) and round r uses lmid64, and it steers the input multiplexer and the key
// scheduler.
//
// Timing: `start` is taken in IDLE; that clock loads the data register and the key
// scheduler (load). Encryption then runs r RUN clocks, one round each, with the key
// scheduler stepping forward. Decryption first spends r-1 PREP clocks stepping the
// key scheduler forward to round r, then runs r RUN clocks stepping it backward.
// `done` is high for one clock after the last round, when the result register holds
// the output; `start` is accepted again in that clock. rounds = 0 behaves as 1.
//
// Origin: Running r-1 orthomorphism rounds before lmid64 follows the cipher; the PREP
// phase for decryption and the handshake are this design's choices.
module nxt64_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       decrypt,
  input  logic [7:0] rounds,
  output logic       busy,
  output logic       load,      // capture plaintext, key and round count
  output logic       run,       // a round is computed this clock
  output logic       last,      // ... and it is the final (lmid64) round
  output logic [1:0] mode,      // round function select for nxt64_round
  output logic       ks_fwd,
  output logic       ks_bwd,
  output logic       done
);
  typedef enum logic [1:0] {S_IDLE, S_PREP, S_RUN} state_t;
  state_t     state;
  logic [7:0] cnt, r_q;
  logic       dec_q;     // direction of the operation in progress

  assign busy   = (state != S_IDLE);
  assign load   = (state == S_IDLE) && start;
  assign run    = (state == S_RUN);
  assign last   = run && (cnt >= r_q);
  assign mode   = last ? 2'd1 : (dec_q ? 2'd2 : 2'd0);
  assign ks_fwd = (state == S_PREP) || (run && !last && !dec_q);
  assign ks_bwd = run && !last && dec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      r_q   <= '0;
      dec_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r_q   <= rounds;
          dec_q <= decrypt;
          cnt   <= 8'd1;
          state <= (decrypt && rounds > 8'd1) ? S_PREP : S_RUN;
        end
        S_PREP: begin
          if (cnt == r_q - 8'd1) begin
            cnt   <= 8'd1;
            state <= S_RUN;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_RUN: begin
          if (last) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

// bist_tcu: test control unit of the offline error-detection architectures. In
// functional use it passes the external request straight to the cipher core. On
// `test_start` it takes the core out of service and runs n_runs encryptions with the
// all-zero key and TEST_ROUNDS rounds:
//
//   test_mode 0 (BIST):          every plaintext is a fresh test pattern, the 8-bit
//                                generator output (counter, LFSR or cellular automaton,
//                                chosen by tpg_sel) repeated in all eight bytes;
//   test_mode 1 (feedback loop): the first plaintext is a test pattern, every later one
//                                is the previous ciphertext.
//
// test_decrypt runs the same test through the decryption direction of the core (the
// round keys are then produced in reverse order); the responses compacted are the
// decryption results and, at round level, the intermediate lmio64 outputs.
//
// test_level 0 compacts only the ciphertexts into the ORA signature (algorithm-level
// test); test_level 1 also compacts every intermediate round output (round-level test).
// After the last run the TCU asks the ORA to compare the signature with the golden one
// and pulses test_done. The test pattern generator advances once per run.
//
// Origin: The BIST and feedback-loop tests, the two test levels, the all-zero test
// key, the run counter and the option of testing the decryption direction follow the
// source architecture; repeating the 8-bit pattern over the block, reading "round
// level" as compacting every round output, and the handshake are this design's
// choices.
module bist_tcu #(
  parameter logic [7:0] TEST_ROUNDS = 8'd16
) (
  input  logic         clk,
  input  logic         rst_n,
  // test request
  input  logic         test_start,
  input  logic         test_mode,
  input  logic         test_level,
  input  logic         test_decrypt,
  input  logic [1:0]   tpg_sel,
  input  logic [15:0]  n_runs,
  output logic         test_busy,
  output logic         test_done,
  // functional request
  input  logic         f_start,
  input  logic         f_decrypt,
  input  logic [63:0]  f_pt,
  input  logic [127:0] f_key,
  input  logic [7:0]   f_rounds,
  // to and from the core
  output logic         c_start,
  output logic         c_decrypt,
  output logic [63:0]  c_pt,
  output logic [127:0] c_key,
  output logic [7:0]   c_rounds,
  input  logic         c_busy,
  input  logic         c_done,
  input  logic [63:0]  c_ct,
  input  logic         c_rnd_valid,
  input  logic [63:0]  c_rnd_out,
  // test pattern generators
  input  logic [7:0]   tpg_cnt,
  input  logic [7:0]   tpg_lfsr,
  input  logic [7:0]   tpg_ca,
  output logic         tpg_init,
  output logic         tpg_en,
  // output response analyzer
  output logic         ora_clr,
  output logic         ora_en,
  output logic [63:0]  ora_din,
  output logic         ora_check
);
  typedef enum logic [1:0] {T_IDLE, T_ISSUE, T_WAIT, T_CHECK} tstate_t;
  tstate_t     st;
  logic [15:0] run_cnt;
  logic [63:0] last_ct;
  logic        mode_q, level_q, dec_q;
  logic [1:0]  sel_q;
  logic [15:0] nruns_q;
  logic [7:0]  pat;

  always_comb begin
    unique case (sel_q)
      2'd1:    pat = tpg_lfsr;
      2'd2:    pat = tpg_ca;
      default: pat = tpg_cnt;
    endcase
  end

  assign test_busy = (st != T_IDLE);
  assign tpg_init  = (st == T_IDLE) && test_start && !c_busy;
  assign ora_clr   = tpg_init;
  assign tpg_en    = (st == T_WAIT) && c_done;
  assign ora_check = (st == T_CHECK);

  always_comb begin
    if (test_busy) begin
      c_start   = (st == T_ISSUE);
      c_decrypt = dec_q;
      c_pt      = (mode_q && run_cnt != 16'd0) ? last_ct : {8{pat}};
      c_key     = '0;
      c_rounds  = TEST_ROUNDS;
    end else begin
      c_start   = f_start && !test_start;
      c_decrypt = f_decrypt;
      c_pt      = f_pt;
      c_key     = f_key;
      c_rounds  = f_rounds;
    end
  end

  always_comb begin
    ora_en  = 1'b0;
    ora_din = c_ct;
    if (st == T_WAIT) begin
      if (c_done) begin
        ora_en  = 1'b1;
        ora_din = c_ct;
      end else if (level_q && c_rnd_valid) begin
        ora_en  = 1'b1;
        ora_din = c_rnd_out;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      run_cnt   <= '0;
      last_ct   <= '0;
      mode_q    <= 1'b0;
      level_q   <= 1'b0;
      dec_q     <= 1'b0;
      sel_q     <= '0;
      nruns_q   <= '0;
      test_done <= 1'b0;
    end else begin
      test_done <= 1'b0;
      unique case (st)
        T_IDLE: if (test_start && !c_busy) begin
          mode_q  <= test_mode;
          level_q <= test_level;
          dec_q   <= test_decrypt;
          sel_q   <= tpg_sel;
          nruns_q <= (n_runs == 16'd0) ? 16'd1 : n_runs;
          run_cnt <= '0;
          st      <= T_ISSUE;
        end
        T_ISSUE: st <= T_WAIT;
        T_WAIT: if (c_done) begin
          last_ct <= c_ct;
          run_cnt <= run_cnt + 16'd1;
          st      <= (run_cnt + 16'd1 == nruns_q) ? T_CHECK : T_ISSUE;
        end
        T_CHECK: begin
          test_done <= 1'b1;
          st        <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule

// nxt64_secure_top: IDEA NXT64 cipher with its error-detection architectures.
//
// Side by side:
//  * the main core (nxt64_core) with the concurrent parity-based checker (PG data bits
//    per parity bit), wrapped by the offline self-test: test control unit (bist_tcu),
//    three 8-bit test pattern generators (counter, LFSR, cellular automaton) and the
//    MISR-based output response analyzer (bist_ora). It runs either the BIST test
//    (fresh patterns) or the feedback-loop test (ciphertext fed back), at algorithm or
//    round level, in the encryption or the decryption direction;
//  * the BILBO variant of the core (nxt64_bilbo), whose round and output registers
//    double as pattern generator and signature register.
// Both read the one loadable substitution table (sbox_table), which must be written
// (256 writes through tab_we/tab_waddr/tab_wdata) before any operation.
//
// Main core timing: start -> done in r+1 clocks for encryption, 2r for decryption.
//
// Origin: Both error-detection architectures and their parts follow the source;
// sharing one core between the parity checker and the offline test, the loadable table
// and the golden-signature ports are this design's choices.
module nxt64_secure_top
  import nxt_pkg::*;
#(
  parameter int unsigned PG          = 32,
  parameter logic [7:0]  TEST_ROUNDS = 8'd16
) (
  input  logic         clk,
  input  logic         rst_n,
  // substitution table load
  input  logic         tab_we,
  input  logic [7:0]   tab_waddr,
  input  logic [7:0]   tab_wdata,
  // main core, functional
  input  logic         start,
  input  logic         decrypt,
  input  logic [63:0]  pt,
  input  logic [127:0] key,
  input  logic [7:0]   rounds,
  output logic         busy,
  output logic         done,
  output logic [63:0]  ct,
  output logic         ced_err,
  output logic         ced_err_now,
  // main core, offline self-test
  input  logic         test_start,
  input  logic         test_mode,
  input  logic         test_level,
  input  logic         test_decrypt,
  input  logic [1:0]   tpg_sel,
  input  logic [15:0]  n_runs,
  input  logic [23:0]  golden,
  output logic         test_busy,
  output logic         test_done,
  output logic         test_pass,
  output logic         test_fail,
  output logic [23:0]  signature,
  // BILBO core
  input  logic         b_start,
  input  logic [63:0]  b_pt,
  input  logic [127:0] b_key,
  input  logic [7:0]   b_rounds,
  output logic         b_busy,
  output logic         b_done,
  output logic [63:0]  b_ct,
  input  logic         b_scan_en,
  input  logic         b_scan_in,
  output logic         b_scan_out,
  input  logic         bt_start,
  input  logic [15:0]  bt_n_runs,
  input  logic [63:0]  bt_golden,
  output logic         bt_busy,
  output logic         bt_done,
  output logic         bt_pass,
  output logic         bt_fail
);
  sbox_t     tab;
  sbox_par_t tab_par;

  logic         c_start, c_decrypt, c_busy, c_done, c_rnd_valid;
  logic [63:0]  c_pt, c_ct, c_rnd_out, ora_din;
  logic [127:0] c_key;
  logic [7:0]   c_rounds, q_cnt, q_lfsr, q_ca;
  logic         tpg_init, tpg_en, ora_clr, ora_en, ora_check;

  sbox_table u_tab (.clk(clk), .we(tab_we), .waddr(tab_waddr), .wdata(tab_wdata),
                    .tab(tab), .tab_par(tab_par));

  nxt64_core #(.PG(PG)) u_core (
    .clk(clk), .rst_n(rst_n), .start(c_start), .decrypt(c_decrypt), .pt(c_pt),
    .key(c_key), .rounds(c_rounds), .tab(tab), .tab_par(tab_par),
    .busy(c_busy), .done(c_done), .ct(c_ct), .rnd_valid(c_rnd_valid),
    .rnd_out(c_rnd_out), .ced_err_now(ced_err_now), .ced_err(ced_err));

  tpg_counter u_tpg_cnt  (.clk(clk), .rst_n(rst_n), .init(tpg_init), .en(tpg_en), .q(q_cnt));
  tpg_lfsr    u_tpg_lfsr (.clk(clk), .rst_n(rst_n), .init(tpg_init), .en(tpg_en), .q(q_lfsr));
  tpg_ca      u_tpg_ca   (.clk(clk), .rst_n(rst_n), .init(tpg_init), .en(tpg_en), .q(q_ca));

  bist_tcu #(.TEST_ROUNDS(TEST_ROUNDS)) u_tcu (
    .clk(clk), .rst_n(rst_n),
    .test_start(test_start), .test_mode(test_mode), .test_level(test_level), .test_decrypt(test_decrypt),
    .tpg_sel(tpg_sel), .n_runs(n_runs), .test_busy(test_busy), .test_done(test_done),
    .f_start(start), .f_decrypt(decrypt), .f_pt(pt), .f_key(key), .f_rounds(rounds),
    .c_start(c_start), .c_decrypt(c_decrypt), .c_pt(c_pt), .c_key(c_key),
    .c_rounds(c_rounds), .c_busy(c_busy), .c_done(c_done), .c_ct(c_ct),
    .c_rnd_valid(c_rnd_valid), .c_rnd_out(c_rnd_out),
    .tpg_cnt(q_cnt), .tpg_lfsr(q_lfsr), .tpg_ca(q_ca), .tpg_init(tpg_init), .tpg_en(tpg_en),
    .ora_clr(ora_clr), .ora_en(ora_en), .ora_din(ora_din), .ora_check(ora_check));

  bist_ora u_ora (.clk(clk), .rst_n(rst_n), .clr(ora_clr), .en(ora_en), .din(ora_din),
                  .check(ora_check), .golden(golden), .sig(signature),
                  .pass(test_pass), .fail(test_fail));

  assign busy = c_busy || test_busy;
  assign done = c_done && !test_busy;
  assign ct   = c_ct;

  nxt64_bilbo #(.TEST_ROUNDS(TEST_ROUNDS)) u_bilbo (
    .clk(clk), .rst_n(rst_n), .tab(tab), .tab_par(tab_par),
    .start(b_start), .pt(b_pt), .key(b_key), .rounds(b_rounds),
    .busy(b_busy), .done(b_done), .ct(b_ct),
    .scan_en(b_scan_en), .scan_in(b_scan_in), .scan_out(b_scan_out),
    .bt_start(bt_start), .n_runs(bt_n_runs), .golden(bt_golden),
    .bt_busy(bt_busy), .bt_done(bt_done), .bt_pass(bt_pass), .bt_fail(bt_fail));
endmodule

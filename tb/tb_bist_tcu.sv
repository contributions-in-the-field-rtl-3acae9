// tb_bist_tcu: the test control unit driving a real core, the three pattern generators
// and the response analyzer. For BIST and feedback-loop tests, at algorithm and round
// level and with each generator, the final signature must equal the one computed from
// the reference cipher, and the verdict must follow the golden value given. Between
// tests a functional encryption must pass through unchanged. The number of encryptions
// per test must equal n_runs, each taking TEST_ROUNDS+1 clocks (2*TEST_ROUNDS when the
// test runs in the decryption direction, which is tried for every mode and level).
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_bist_tcu;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  localparam logic [7:0] TR = 8'd4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  sbox_t tab; sbox_par_t tab_par;
  logic test_start = 0, test_mode = 0, test_level = 0, test_decrypt = 0; logic [1:0] tpg_sel = 0; logic [15:0] n_runs = 0;
  logic test_busy, test_done;
  logic f_start = 0; logic [63:0] f_pt = 0; logic [127:0] f_key = 0; logic [7:0] f_rounds = 0;
  logic c_start, c_decrypt, c_busy, c_done, c_rv, cen, ce; logic [63:0] c_pt, c_ct, c_ro; logic [127:0] c_key; logic [7:0] c_rounds;
  logic [7:0] q0, q1, q2; logic tpg_init, tpg_en, ora_clr, ora_en, ora_check, pass, fail;
  logic [63:0] ora_din; logic [23:0] golden = 0, sig;

  bist_tcu #(.TEST_ROUNDS(TR)) u_dut (.clk, .rst_n, .test_start, .test_mode, .test_level, .test_decrypt, .tpg_sel, .n_runs,
    .test_busy, .test_done, .f_start, .f_decrypt(1'b0), .f_pt, .f_key, .f_rounds,
    .c_start, .c_decrypt, .c_pt, .c_key, .c_rounds, .c_busy, .c_done, .c_ct, .c_rnd_valid(c_rv), .c_rnd_out(c_ro),
    .tpg_cnt(q0), .tpg_lfsr(q1), .tpg_ca(q2), .tpg_init, .tpg_en, .ora_clr, .ora_en, .ora_din, .ora_check);
  nxt64_core u_core (.clk, .rst_n, .start(c_start), .decrypt(c_decrypt), .pt(c_pt), .key(c_key), .rounds(c_rounds),
    .tab, .tab_par, .busy(c_busy), .done(c_done), .ct(c_ct), .rnd_valid(c_rv), .rnd_out(c_ro), .ced_err_now(cen), .ced_err(ce));
  tpg_counter u_t0 (.clk, .rst_n, .init(tpg_init), .en(tpg_en), .q(q0));
  tpg_lfsr    u_t1 (.clk, .rst_n, .init(tpg_init), .en(tpg_en), .q(q1));
  tpg_ca      u_t2 (.clk, .rst_n, .init(tpg_init), .en(tpg_en), .q(q2));
  bist_ora    u_ora (.clk, .rst_n, .clr(ora_clr), .en(ora_en), .din(ora_din), .check(ora_check), .golden, .sig, .pass, .fail);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run_test(input int mode, input int level, input int sel, input int n, input bit good,
                         input bit dec = 1'b0);
    logic [23:0] e; int starts, lat;
    e = ref_bist_sig(mode, level, sel, n, int'(TR), dec);
    test_decrypt = dec;
    @(negedge clk);
    test_start = 1; test_mode = mode[0]; test_level = level[0]; tpg_sel = 2'(sel); n_runs = 16'(n);
    golden = good ? e : ~e;
    @(negedge clk); test_start = 0;
    starts = 0; lat = 1;
    while (!test_done) begin
      if (c_start) starts++;
      @(negedge clk); lat++;
    end
    check(sig == e, $sformatf("signature mode %0d level %0d sel %0d dec %0d: %h vs %h", mode, level, sel, dec, sig, e));
    check(pass == good && fail == !good, "verdict");
    check(starts == n, "number of encryptions");
    check(lat == n * (dec ? 2 * int'(TR) + 1 : int'(TR) + 2) + 2, $sformatf("test length %0d clocks", lat));
  endtask

  initial begin
    int lat;
    ref_gen_sbox();
    for (int i = 0; i < 256; i++) begin tab[i] = ref_sb[i]; tab_par[i] = ^ref_sb[i]; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int mode = 0; mode < 2; mode++)
      for (int level = 0; level < 2; level++)
        for (int sel = 0; sel < 3; sel++)
          run_test(mode, level, sel, 3 + sel, (sel != 1));
    for (int mode = 0; mode < 2; mode++)
      for (int level = 0; level < 2; level++)
        run_test(mode, level, mode + level, 3, (level == 0), 1'b1);
    // functional pass-through
    @(negedge clk); f_start = 1; f_pt = 64'h0123456789ABCDEF; f_key = {4{32'hDEADBEEF}}; f_rounds = 8'd16;
    @(negedge clk); f_start = 0; lat = 1;
    while (!c_done) begin @(negedge clk); lat++; end
    check(c_ct == ref_encrypt(64'h0123456789ABCDEF, {4{32'hDEADBEEF}}, 16), "functional encryption");
    check(lat == 17 && !test_busy, "functional latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

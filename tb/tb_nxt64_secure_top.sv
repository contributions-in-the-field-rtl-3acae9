// tb_nxt64_secure_top: end-to-end test of the whole design at its default parameters
// (one parity bit per 32 bits, 16-round self-tests).
//
//  1. loads a random substitution table through the table write port;
//  2. encrypts and decrypts random blocks with 16 rounds and other round counts and
//     compares with the reference cipher, including latency (r+1 / 2r clocks);
//  3. injects faults by simulator command (force/release): a transient bit flip and a
//     stuck-at bit inside the round function; the concurrent checker must flag every
//     wrong ciphertext;
//  4. runs the offline self-test in BIST and feedback-loop form, at algorithm and round
//     level, with each pattern generator, and in the decryption direction; fault-free runs must pass against the
//     reference signature, runs with a stuck-at fault must fail;
//  5. runs the BILBO core: encryption, scan shift, self-test pass and fail.
// Each mechanism is counted; one that never happened counts as a failure.
//
// Origin: The mechanisms exercised (parity detection of transient and permanent
// faults, BIST and feedback-loop self-tests at both levels with all three generators,
// BILBO test) follow the source architecture; the stimulus, fault sites and expected
// signatures are this testbench's own.
`timescale 1ns/1ps
module tb_nxt64_secure_top;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;

  logic tab_we = 0; logic [7:0] tab_waddr = 0, tab_wdata = 0;
  logic start = 0, decrypt = 0; logic [63:0] pt = 0; logic [127:0] key = 0; logic [7:0] rounds = 0;
  logic busy, done, ced_err, ced_err_now; logic [63:0] ct;
  logic test_start = 0, test_mode = 0, test_level = 0, test_decrypt = 0; logic [1:0] tpg_sel = 0; logic [15:0] n_runs = 0;
  logic [23:0] golden = 0, signature; logic test_busy, test_done, test_pass, test_fail;
  logic b_start = 0; logic [63:0] b_pt = 0; logic [127:0] b_key = 0; logic [7:0] b_rounds = 0;
  logic b_busy, b_done, b_scan_out; logic [63:0] b_ct; logic b_scan_en = 0, b_scan_in = 0;
  logic bt_start = 0; logic [15:0] bt_n_runs = 0; logic [63:0] bt_golden = 0; logic bt_busy, bt_done, bt_pass, bt_fail;

  nxt64_secure_top u_dut (.*);

  // mechanism counters
  int n_tab_load, n_enc, n_dec, n_var_rounds, n_ced_transient, n_ced_stuck, n_bist_pass, n_bist_fail,
      n_loop, n_round_level, n_test_dec, n_tpg [3], n_bilbo_enc, n_bilbo_scan, n_bilbo_pass, n_bilbo_fail;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic op(input bit dec, input logic [63:0] din, input logic [127:0] k, input int r, output int lat);
    @(negedge clk); start = 1; decrypt = dec; pt = din; key = k; rounds = 8'(r);
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  task automatic selftest(input int mode, input int level, input int sel, input int n, output logic [23:0] e,
                          input bit dec = 1'b0);
    e = ref_bist_sig(mode, level, sel, n, 16, dec);
    @(negedge clk); test_start = 1; test_decrypt = dec; test_mode = mode[0]; test_level = level[0]; tpg_sel = 2'(sel);
    n_runs = 16'(n); golden = e;
    @(negedge clk); test_start = 0;
    while (!test_done) @(negedge clk);
  endtask

  initial begin
    logic [63:0] p, c, e64; logic [127:0] k; logic [23:0] e; int lat, r, wrong, flagged; logic [31:0] flip;
    n_tab_load = 0; n_enc = 0; n_dec = 0; n_var_rounds = 0; n_ced_transient = 0; n_ced_stuck = 0;
    n_bist_pass = 0; n_bist_fail = 0; n_loop = 0; n_round_level = 0; n_test_dec = 0; n_tpg = '{0, 0, 0};
    n_bilbo_enc = 0; n_bilbo_scan = 0; n_bilbo_pass = 0; n_bilbo_fail = 0;
    ref_gen_sbox();
    repeat (2) @(negedge clk); rst_n = 1;

    // 1. table load
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); tab_we = 1; tab_waddr = 8'(i); tab_wdata = ref_sb[i];
    end
    @(negedge clk); tab_we = 0; n_tab_load++;

    // 2. encryption / decryption
    for (int t = 0; t < 10; t++) begin
      p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
      r = (t < 6) ? 16 : (t == 6) ? 1 : (t == 7) ? 255 : int'($urandom_range(40, 2));
      if (r != 16) n_var_rounds++;
      op(1'b0, p, k, r, lat); c = ct;
      check(c == ref_encrypt(p, k, r), $sformatf("encryption r=%0d", r));
      check(lat == r + 1, $sformatf("encryption latency %0d r=%0d", lat, r));
      check(!ced_err, "false concurrent error on encryption");
      n_enc++;
      op(1'b1, c, k, r, lat);
      check(ct == p, $sformatf("decryption r=%0d", r));
      check(lat == ((r > 1) ? 2 * r : 2), "decryption latency");
      check(!ced_err, "false concurrent error on decryption");
      n_dec++;
    end

    // 3. concurrent error detection
    wrong = 0; flagged = 0;
    for (int t = 0; t < 12; t++) begin
      p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); start = 1; decrypt = 0; pt = p; key = k; rounds = 8'd16;
      @(negedge clk); start = 0;
      repeat (2 + t) @(negedge clk);
      // transient single-bit flip of the first sbox layer output for one clock
      flip = u_dut.u_core.u_round.s1 ^ (32'd1 << (t % 32));
      force u_dut.u_core.u_round.s1 = flip;
      @(negedge clk);
      release u_dut.u_core.u_round.s1;
      while (!done) @(negedge clk);
      if (ct != ref_encrypt(p, k, 16)) begin
        wrong++;
        if (ced_err) begin flagged++; n_ced_transient++; end
        check(ced_err, "transient fault not flagged");
      end
    end
    check(wrong > 0, "transient faults never changed a result");
    for (int t = 0; t < 6; t++) begin
      p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
      // stuck-at-0 in the mu4 output, a different bit each time
      case (t)
        0: force u_dut.u_core.u_round.m[0] = 1'b0;
        1: force u_dut.u_core.u_round.m[5] = 1'b0;
        2: force u_dut.u_core.u_round.m[10] = 1'b0;
        3: force u_dut.u_core.u_round.m[15] = 1'b0;
        4: force u_dut.u_core.u_round.m[20] = 1'b0;
        default: force u_dut.u_core.u_round.m[25] = 1'b0;
      endcase
      op(1'b0, p, k, 16, lat);
      case (t)
        0: release u_dut.u_core.u_round.m[0];
        1: release u_dut.u_core.u_round.m[5];
        2: release u_dut.u_core.u_round.m[10];
        3: release u_dut.u_core.u_round.m[15];
        4: release u_dut.u_core.u_round.m[20];
        default: release u_dut.u_core.u_round.m[25];
      endcase
      if (ct != ref_encrypt(p, k, 16)) begin
        check(ced_err, "stuck-at fault not flagged");
        if (ced_err) n_ced_stuck++;
      end
    end

    // 4. offline self-test of the main core
    for (int mode = 0; mode < 2; mode++)
      for (int level = 0; level < 2; level++)
        for (int sel = 0; sel < 3; sel++) begin
          selftest(mode, level, sel, 4, e);
          check(signature == e && test_pass && !test_fail,
                $sformatf("self-test mode %0d level %0d sel %0d", mode, level, sel));
          check(!ced_err, "concurrent flag during fault-free self-test");
          if (test_pass) begin
            n_bist_pass++; n_tpg[sel]++;
            if (mode == 1) n_loop++;
            if (level == 1) n_round_level++;
          end
        end
    // the same tests in the decryption direction
    for (int mode = 0; mode < 2; mode++)
      for (int level = 0; level < 2; level++) begin
        selftest(mode, level, mode + level, 3, e, 1'b1);
        check(signature == e && test_pass, $sformatf("decryption self-test mode %0d level %0d", mode, level));
        if (test_pass) n_test_dec++;
      end
    force u_dut.u_core.u_round.s2[17] = 1'b1;            // stuck-at-1 in the second sbox layer
    selftest(0, 0, 1, 4, e);
    release u_dut.u_core.u_round.s2[17];
    check(test_fail && !test_pass, "stuck-at fault passed the self-test");
    if (test_fail) n_bist_fail++;

    // 5. BILBO core
    p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); b_start = 1; b_pt = p; b_key = k; b_rounds = 8'd16;
    @(negedge clk); b_start = 0; lat = 1;
    while (!b_done) begin @(negedge clk); lat++; end
    check(b_ct == ref_encrypt(p, k, 16) && lat == 17, "BILBO core encryption");
    n_bilbo_enc++;
    e64 = b_ct;
    b_scan_en = 1;
    for (int i = 0; i < 64; i++) begin
      check(b_scan_out == e64[63 - i], "BILBO scan out");
      @(negedge clk);
    end
    b_scan_en = 0; n_bilbo_scan++;
    e64 = ref_bilbo_sig(2, 16);
    @(negedge clk); bt_start = 1; bt_n_runs = 16'd2; bt_golden = e64;
    @(negedge clk); bt_start = 0;
    while (!bt_done) @(negedge clk);
    check(bt_pass && b_ct == e64, "BILBO self-test pass");
    if (bt_pass) n_bilbo_pass++;
    force u_dut.u_bilbo.u_round.zr[40 - 32] = 1'b0;
    @(negedge clk); bt_start = 1;
    @(negedge clk); bt_start = 0;
    while (!bt_done) @(negedge clk);
    release u_dut.u_bilbo.u_round.zr[40 - 32];
    check(bt_fail, "BILBO self-test missed a stuck-at fault");
    if (bt_fail) n_bilbo_fail++;

    // mechanism coverage
    check(n_tab_load > 0, "table load never happened");
    check(n_enc > 0 && n_dec > 0 && n_var_rounds > 0, "encryption/decryption/round count");
    check(n_ced_transient > 0, "concurrent detection of a transient fault never happened");
    check(n_ced_stuck > 0, "concurrent detection of a stuck-at fault never happened");
    check(n_bist_pass > 0 && n_bist_fail > 0, "self-test pass/fail");
    check(n_loop > 0 && n_round_level > 0, "feedback loop / round-level test");
    check(n_test_dec > 0, "self-test in the decryption direction");
    check(n_tpg[0] > 0 && n_tpg[1] > 0 && n_tpg[2] > 0, "each pattern generator");
    check(n_bilbo_enc > 0 && n_bilbo_scan > 0 && n_bilbo_pass > 0 && n_bilbo_fail > 0, "BILBO modes");
    $display("mechanisms: table_load=%0d enc=%0d dec=%0d var_rounds=%0d ced_transient=%0d/%0d ced_stuck=%0d bist_pass=%0d bist_fail=%0d test_dec=%0d loop=%0d round_level=%0d tpg=%0d/%0d/%0d bilbo enc=%0d scan=%0d pass=%0d fail=%0d",
             n_tab_load, n_enc, n_dec, n_var_rounds, flagged, wrong, n_ced_stuck, n_bist_pass, n_bist_fail, n_test_dec, n_loop,
             n_round_level, n_tpg[0], n_tpg[1], n_tpg[2], n_bilbo_enc, n_bilbo_scan, n_bilbo_pass, n_bilbo_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

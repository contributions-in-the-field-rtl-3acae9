// tb_fault_campaign: detection-rate experiment for the error-detection schemes.
//
// Stuck-at faults are injected by simulator command into the output of the mu4
// diffusion layer of the round function: the net is forced to its fault-free value
// (recomputed from its own input) with k random bits held at 0 in a first pass, and
// each at a random 0 or 1 in a second. For k = 1, 2, 4, 8 and 16 stuck bits:
//  * concurrent part: three cores with 1, 2 and 4 parity bits per 32-bit word encrypt
//    random blocks under the same fault; every wrong ciphertext counts, and it is
//    detected when the core's error flag is up at the end of the operation;
//  * offline part: the full top level runs its LFSR BIST and its feedback-loop test
//    under the fault; a run whose verdict is "fail" counts as a detection.
// Printed per k: wrong results and detection rate of each scheme. Checked: a single
// stuck bit is always detected by every scheme; with more stuck bits the 4-bit parity
// scheme detects no less than the 1-bit one (within 5 %), and the offline tests detect
// every fault set that changes the cipher.
//
// Origin: Injecting stuck-at faults by simulator command and measuring detection per
// parity level and per offline test follow the source's fault evaluation; the fault
// site, the numbers of stuck bits, the set sizes and the mixed-polarity pass are this
// testbench's choices.
`timescale 1ns/1ps
module tb_fault_campaign;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (600000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---- three parity levels, shared stimulus ----
  logic start = 0; logic [63:0] pt = 0; logic [127:0] key = 0;
  sbox_t tab; sbox_par_t tab_par;
  logic [2:0] busy, done, rv, cen, ce; logic [63:0] ct [3]; logic [63:0] ro [3];
  nxt64_core #(.PG(32)) u_c32 (.clk, .rst_n, .start, .decrypt(1'b0), .pt, .key, .rounds(8'd16), .tab, .tab_par,
    .busy(busy[0]), .done(done[0]), .ct(ct[0]), .rnd_valid(rv[0]), .rnd_out(ro[0]), .ced_err_now(cen[0]), .ced_err(ce[0]));
  nxt64_core #(.PG(16)) u_c16 (.clk, .rst_n, .start, .decrypt(1'b0), .pt, .key, .rounds(8'd16), .tab, .tab_par,
    .busy(busy[1]), .done(done[1]), .ct(ct[1]), .rnd_valid(rv[1]), .rnd_out(ro[1]), .ced_err_now(cen[1]), .ced_err(ce[1]));
  nxt64_core #(.PG(8)) u_c8 (.clk, .rst_n, .start, .decrypt(1'b0), .pt, .key, .rounds(8'd16), .tab, .tab_par,
    .busy(busy[2]), .done(done[2]), .ct(ct[2]), .rnd_valid(rv[2]), .rnd_out(ro[2]), .ced_err_now(cen[2]), .ced_err(ce[2]));

  // ---- full top level for the offline tests ----
  logic tab_we = 0; logic [7:0] tab_waddr = 0, tab_wdata = 0;
  logic t_busy, t_done, t_ced, t_ced_now; logic [63:0] t_ct;
  logic test_start = 0, test_mode = 0; logic [23:0] golden = 0, signature;
  logic test_busy, test_done, test_pass, test_fail;
  logic b_busy, b_done, b_scan_out, bt_busy, bt_done, bt_pass, bt_fail; logic [63:0] b_ct;
  nxt64_secure_top u_top (.clk, .rst_n, .tab_we, .tab_waddr, .tab_wdata,
    .start(1'b0), .decrypt(1'b0), .pt(64'd0), .key(128'd0), .rounds(8'd16),
    .busy(t_busy), .done(t_done), .ct(t_ct), .ced_err(t_ced), .ced_err_now(t_ced_now),
    .test_start, .test_mode, .test_level(1'b0), .test_decrypt(1'b0), .tpg_sel(2'd1), .n_runs(16'd4), .golden,
    .test_busy, .test_done, .test_pass, .test_fail, .signature,
    .b_start(1'b0), .b_pt(64'd0), .b_key(128'd0), .b_rounds(8'd16), .b_busy, .b_done, .b_ct,
    .b_scan_en(1'b0), .b_scan_in(1'b0), .b_scan_out, .bt_start(1'b0), .bt_n_runs(16'd1),
    .bt_golden(64'd0), .bt_busy, .bt_done, .bt_pass, .bt_fail);

  logic [31:0] mask = '0;   // bits of the mu4 output that are stuck
  logic [31:0] pol  = '0;   // value each stuck bit is stuck at

  task automatic encrypt_all();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done[0]) @(negedge clk);
  endtask

  task automatic selftest(input bit mode, input logic [23:0] e);
    @(negedge clk); test_start = 1; test_mode = mode; golden = e;
    @(negedge clk); test_start = 0;
    while (!test_done) @(negedge clk);
  endtask

  localparam int NK = 5;
  localparam int KS [NK] = '{1, 2, 4, 8, 16};
  localparam int SETS = 24, BLOCKS = 8;

  initial begin
    logic [23:0] g_bist, g_loop; logic [63:0] e;
    int wrong [3], det [3], off_sets, off_det [2], rate [3];
    ref_gen_sbox();
    for (int i = 0; i < 256; i++) begin tab[i] = ref_sb[i]; tab_par[i] = ^ref_sb[i]; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); tab_we = 1; tab_waddr = 8'(i); tab_wdata = ref_sb[i];
    end
    @(negedge clk); tab_we = 0;
    g_bist = ref_bist_sig(0, 0, 1, 4, 16);
    g_loop = ref_bist_sig(1, 0, 1, 4, 16);
    // fault-free reference runs
    selftest(1'b0, g_bist); check(test_pass, "fault-free BIST");
    selftest(1'b1, g_loop); check(test_pass, "fault-free feedback loop");

    force u_c32.u_round.m = (mu4(u_c32.u_round.s1) & ~mask) | (mask & pol);
    force u_c16.u_round.m = (mu4(u_c16.u_round.s1) & ~mask) | (mask & pol);
    force u_c8.u_round.m  = (mu4(u_c8.u_round.s1) & ~mask) | (mask & pol);
    force u_top.u_core.u_round.m = (mu4(u_top.u_core.u_round.s1) & ~mask) | (mask & pol);

    for (int pm = 0; pm < 2; pm++)
    for (int ki = 0; ki < NK; ki++) begin
      wrong = '{0, 0, 0}; det = '{0, 0, 0}; off_sets = 0; off_det = '{0, 0};
      for (int s = 0; s < SETS; s++) begin
        bit changed;
        mask = '0;
        while ($countones(mask) < KS[ki]) mask[$urandom_range(31, 0)] = 1'b1;
        pol = pm ? $urandom : 32'h0;
        changed = 1'b0;
        for (int b = 0; b < BLOCKS; b++) begin
          pt = {$urandom, $urandom}; key = {$urandom, $urandom, $urandom, $urandom};
          e = ref_encrypt(pt, key, 16);
          encrypt_all();
          for (int d = 0; d < 3; d++)
            if (ct[d] != e) begin
              wrong[d]++; changed = 1'b1;
              if (ce[d]) det[d]++;
            end
        end
        if (changed) begin
          off_sets++;
          selftest(1'b0, g_bist); if (test_fail) off_det[0]++;
          selftest(1'b1, g_loop); if (test_fail) off_det[1]++;
        end
      end
      for (int d = 0; d < 3; d++) rate[d] = wrong[d] ? (1000 * det[d]) / wrong[d] : 1000;
      $display("%s stuck bits=%0d | concurrent detection (per mille of wrong ciphertexts): 1 bit %0d (%0d/%0d), 2 bits %0d (%0d/%0d), 4 bits %0d (%0d/%0d) | offline fault sets detected: BIST %0d/%0d, loop %0d/%0d",
               pm ? "stuck-at-0/1" : "stuck-at-0", KS[ki], rate[0], det[0], wrong[0], rate[1], det[1], wrong[1], rate[2], det[2], wrong[2],
               off_det[0], off_sets, off_det[1], off_sets);
      check(wrong[0] > 0, "fault sets never changed a ciphertext");
      if (KS[ki] == 1)
        for (int d = 0; d < 3; d++) check(det[d] == wrong[d], "single stuck bit missed by the concurrent checker");
      check(rate[2] + 50 >= rate[0], "4-bit parity detects clearly less than 1-bit parity");
      check(off_det[0] == off_sets && off_det[1] == off_sets, "offline test missed a fault set");
    end
    release u_c32.u_round.m; release u_c16.u_round.m; release u_c8.u_round.m;
    release u_top.u_core.u_round.m;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

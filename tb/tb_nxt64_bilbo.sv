// tb_nxt64_bilbo: the BILBO core. Functional encryptions must match the reference
// cipher with r+1 clocks latency; a scan shift must move the data register contents
// through the output register to scan_out; the self-test signature must equal the one
// computed from the reference round function, PRPG and MISR, with pass/fail following
// the golden value (golden values wrong in a single bit, one in each 16-bit quarter,
// must all fail); a corrupted sbox entry must make the self-test fail.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_nxt64_bilbo;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  localparam logic [7:0] TR = 8'd5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  sbox_t tab; sbox_par_t tab_par;
  logic start = 0; logic [63:0] pt = 0; logic [127:0] key = 0; logic [7:0] rounds = 0;
  logic busy, done; logic [63:0] ct;
  logic scan_en = 0, scan_in = 0, scan_out;
  logic bt_start = 0; logic [15:0] n_runs = 0; logic [63:0] golden = 0; logic bt_busy, bt_done, bt_pass, bt_fail;
  nxt64_bilbo #(.TEST_ROUNDS(TR)) u_dut (.clk, .rst_n, .tab, .tab_par, .start, .pt, .key, .rounds,
    .busy, .done, .ct, .scan_en, .scan_in, .scan_out, .bt_start, .n_runs, .golden,
    .bt_busy, .bt_done, .bt_pass, .bt_fail);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic selftest(input int n, input bit good, input logic [63:0] e);
    @(negedge clk); bt_start = 1; n_runs = 16'(n); golden = good ? e : e ^ (64'd1 << $urandom_range(63, 0));
    @(negedge clk); bt_start = 0;
    while (!bt_done) @(negedge clk);
  endtask

  initial begin
    logic [63:0] p, e, chain [2]; logic [127:0] k; int lat, r;
    ref_gen_sbox();
    for (int i = 0; i < 256; i++) begin tab[i] = ref_sb[i]; tab_par[i] = ^ref_sb[i]; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom}; r = (t < 3) ? 16 : t + 1;
      @(negedge clk); start = 1; pt = p; key = k; rounds = 8'(r);
      @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(ct == ref_encrypt(p, k, r), "functional encryption");
      check(lat == r + 1, "latency");
    end
    // scan: 128 shifts bring out the output register then the data register
    chain[0] = ct; chain[1] = u_dut.dq;
    scan_en = 1;
    for (int i = 0; i < 128; i++) begin
      check(scan_out == ((i < 64) ? chain[0][63 - i] : chain[1][127 - i]), $sformatf("scan bit %0d", i));
      scan_in = 1'b0;
      @(negedge clk);
    end
    scan_en = 0;
    // self-test
    // (runs 4..7 are given a golden value wrong in one bit of each 16-bit quarter)
    for (int n = 1; n <= 7; n++) begin
      e = ref_bilbo_sig((n > 3) ? 2 : n, int'(TR));
      if (n > 3) begin
        @(negedge clk); bt_start = 1; n_runs = 16'd2; golden = e ^ (64'd1 << (16 * (n - 4) + $urandom_range(15, 0)));
        @(negedge clk); bt_start = 0;
        while (!bt_done) @(negedge clk);
      end else selftest(n, n != 2, e);
      check(ct == e, $sformatf("signature n=%0d %h vs %h", n, ct, e));
      check(bt_pass == (n == 1 || n == 3) && bt_fail == !(n == 1 || n == 3), "verdict");
    end
    // a faulty table entry must be caught by the self-test
    // (the entry read by the first round: PRPG state 1 gives f32 input 1 ^ rk0)
    e = ref_rk('0, 1, TR);
    tab[e[39:32] ^ 8'h01] = tab[e[39:32] ^ 8'h01] ^ 8'h01;
    selftest(3, 1'b1, ref_bilbo_sig(3, int'(TR)));
    check(bt_fail, "sbox fault not caught by BILBO self-test");
    tab[e[39:32] ^ 8'h01] = tab[e[39:32] ^ 8'h01] ^ 8'h01;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nxt64_core: checks the iterative IDEA NXT64 core against the reference model at
// all three parity redundancy levels (one parity bit per 32, 16 and 8 bits) at once.
// Random keys, blocks and round counts; encryption results and decryption round trips
// are compared with the model, the start-to-done latency with r+1 (encryption) and 2r
// (decryption) clocks, and the concurrent error flag must stay low. Then one bit of
// one substitution-table entry is flipped while its parity entry is kept (a stored-bit
// fault): every wrong ciphertext must come with the error flag raised. Last, the held
// ciphertext register is upset one bit at a time (by forcing it) and the output
// register's parity check must fire.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_nxt64_core;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         start = 1'b0, decrypt = 1'b0;
  logic [63:0]  pt = '0;
  logic [127:0] key = '0;
  logic [7:0]   rounds = 8'd16;
  sbox_t        tab;
  sbox_par_t    tab_par;
  logic [2:0]   busy, done, rv, cen, ce;
  logic [63:0]  ct [3];
  logic [63:0]  ro [3];

  nxt64_core #(.PG(32)) u_dut32 (.clk, .rst_n, .start, .decrypt, .pt, .key, .rounds, .tab, .tab_par,
    .busy(busy[0]), .done(done[0]), .ct(ct[0]), .rnd_valid(rv[0]), .rnd_out(ro[0]),
    .ced_err_now(cen[0]), .ced_err(ce[0]));
  nxt64_core #(.PG(16)) u_dut16 (.clk, .rst_n, .start, .decrypt, .pt, .key, .rounds, .tab, .tab_par,
    .busy(busy[1]), .done(done[1]), .ct(ct[1]), .rnd_valid(rv[1]), .rnd_out(ro[1]),
    .ced_err_now(cen[1]), .ced_err(ce[1]));
  nxt64_core #(.PG(8)) u_dut8 (.clk, .rst_n, .start, .decrypt, .pt, .key, .rounds, .tab, .tab_par,
    .busy(busy[2]), .done(done[2]), .ct(ct[2]), .rnd_valid(rv[2]), .rnd_out(ro[2]),
    .ced_err_now(cen[2]), .ced_err(ce[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_table();
    for (int i = 0; i < 256; i++) begin
      tab[i]     = ref_sb[i];
      tab_par[i] = ^ref_sb[i];
    end
  endtask

  // one operation; returns the latency in clocks from the start edge to done
  task automatic run_op(input bit dec, input logic [63:0] din, input logic [127:0] k,
                        input logic [7:0] r, output int lat);
    @(negedge clk);
    start = 1'b1; decrypt = dec; pt = din; key = k; rounds = r;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done[0]) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0]  p, c, expc;
    logic [127:0] k;
    int           r, lat, wrong, detected;
    ref_gen_sbox();
    load_table();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 24; t++) begin
      p = {$urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      r = (t < 12) ? 16 : int'($urandom_range(20, 1));
      if (t == 0) r = 1;
      if (t == 1) begin p = '0; k = '0; end
      expc = ref_encrypt(p, k, r);
      run_op(1'b0, p, k, 8'(r), lat);
      for (int d = 0; d < 3; d++)
        check(ct[d] == expc, $sformatf("enc PG%0d r=%0d got %h exp %h", 32 >> d, r, ct[d], expc));
      check(lat == r + 1, $sformatf("enc latency %0d for r=%0d", lat, r));
      check(ce == 3'b000, "ced_err raised on fault-free encryption");
      c = expc;
      run_op(1'b1, c, k, 8'(r), lat);
      for (int d = 0; d < 3; d++)
        check(ct[d] == p, $sformatf("dec PG%0d r=%0d got %h exp %h", 32 >> d, r, ct[d], p));
      check(ct[0] == ref_decrypt(c, k, r), "dec vs reference decrypt");
      check(lat == ((r > 1) ? 2 * r : 2), $sformatf("dec latency %0d for r=%0d", lat, r));
      check(ce == 3'b000, "ced_err raised on fault-free decryption");
    end

    // stored-bit fault in one table entry, parity entry left as it was
    wrong = 0; detected = 0;
    begin
      int e;
      e = int'($urandom_range(255, 0));
      tab[e] = tab[e] ^ 8'h10;
      for (int t = 0; t < 16; t++) begin
        p = {$urandom, $urandom};
        k = {$urandom, $urandom, $urandom, $urandom};
        expc = ref_encrypt(p, k, 16);
        run_op(1'b0, p, k, 8'd16, lat);
        for (int d = 0; d < 3; d++) begin
          if (ct[d] != expc) begin
            wrong++;
            if (ce[d]) detected++;
            check(ce[d] == 1'b1, $sformatf("undetected wrong ciphertext PG%0d", 32 >> d));
          end
        end
      end
      tab[e] = tab[e] ^ 8'h10;
    end
    check(wrong > 0, "injected table fault never changed a ciphertext");
    $display("table fault: %0d wrong ciphertexts, %0d flagged", wrong, detected);

    // the error flag clears when the next operation starts
    p = {$urandom, $urandom}; k = {$urandom, $urandom, $urandom, $urandom};
    run_op(1'b0, p, k, 8'd16, lat);
    check(ce == 3'b000 && ct[0] == ref_encrypt(p, k, 16), "error flag not cleared by a new operation");

    // upset of one bit of the held ciphertext register: its parity check must fire
    for (int t = 0; t < 8; t++) begin
      logic [63:0] bad, good;
      good = ct[0];
      bad  = good ^ (64'd1 << (8 * t + t));
      force u_dut32.ct = bad;
      #1;
      check(cen[0] == 1'b1, "output register upset not flagged (PG32)");
      force u_dut32.ct = good;   // a released variable keeps its forced value
      release u_dut32.ct;
      #1;
      check(cen[0] == 1'b0, "output register flag after release");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

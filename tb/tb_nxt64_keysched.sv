// tb_nxt64_keysched: round keys for random 128-bit keys and round counts, one per
// clock, forward from round 1 to r and backward to 1, against the reference key
// schedule (LFSR clocked one step at a time, dkey and nl64 recomputed per round).
// Predicted round-key parity must match, err must stay low.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_nxt64_keysched;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic load = 0, fwd = 0, bwd = 0; logic [127:0] key = '0; logic [7:0] r = 0;
  sbox_t tab; sbox_par_t tab_par;
  logic [63:0] rk; logic [1:0] rkp; logic err;
  nxt64_keysched #(.PG(32)) u_dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .rounds(r),
    .fwd(fwd), .bwd(bwd), .tab(tab), .tab_par(tab_par), .rk(rk), .rkp(rkp), .err(err));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [127:0] k; logic [7:0] rr; logic [63:0] e;
    ref_gen_sbox();
    for (int i = 0; i < 256; i++) begin tab[i] = ref_sb[i]; tab_par[i] = ^ref_sb[i]; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      k = (t == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      rr = (t < 2) ? 8'd16 : 8'($urandom_range(24, 2));
      @(negedge clk); load = 1; key = k; r = rr;
      @(negedge clk); load = 0; key = ~k;    // key input is captured only at load
      for (int i = 1; i <= rr; i++) begin
        e = ref_rk(k, i, rr);
        check(rk == e, $sformatf("round %0d key %h vs %h", i, rk, e));
        check(rkp == 2'(ref_par(128'(rk), 64, 32)) && !err, "parity");
        if (i < rr) begin fwd = 1; @(negedge clk); fwd = 0; end
      end
      for (int i = int'(rr) - 1; i >= 1; i--) begin
        bwd = 1; @(negedge clk); bwd = 0;
        check(rk == ref_rk(k, i, rr), $sformatf("backward round %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

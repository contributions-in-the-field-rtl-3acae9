// tb_nxt64_round: the three round forms (lmor64, lmid64, lmio64) against the reference
// round function for random states and keys at 1 and 4 parity bits per 32 bits. The
// predicted output parity must match the output and the verifiers must stay quiet;
// a wrong sbox-parity table entry must make the predicted parity disagree with the
// data when that entry is used; lmid64 must be an involution.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_nxt64_round;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  sbox_t tab; sbox_par_t tab_par;
  logic [1:0] mode; logic [63:0] x, rk, ya, yb;
  logic [1:0] xpa, rkpa, ypa; logic [7:0] xpb, rkpb, ypb; logic ea, eb;
  nxt64_round #(.PG(32)) ua (.mode(mode), .x(x), .xp(xpa), .rk(rk), .rkp(rkpa), .tab(tab), .tab_par(tab_par), .y(ya), .yp(ypa), .err(ea));
  nxt64_round #(.PG(8))  ub (.mode(mode), .x(x), .xp(xpb), .rk(rk), .rkp(rkpb), .tab(tab), .tab_par(tab_par), .y(yb), .yp(ypb), .err(eb));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic apply(input logic [1:0] m, input logic [63:0] v, input logic [63:0] k);
    mode = m; x = v; rk = k;
    xpa = 2'(ref_par(128'(v), 64, 32)); xpb = 8'(ref_par(128'(v), 64, 8));
    rkpa = 2'(ref_par(128'(k), 64, 32)); rkpb = 8'(ref_par(128'(k), 64, 8));
    #1;
  endtask
  initial begin
    logic [63:0] v, k, y1; int mism;
    ref_gen_sbox();
    for (int i = 0; i < 256; i++) begin tab[i] = ref_sb[i]; tab_par[i] = ^ref_sb[i]; end
    for (int t = 0; t < 300; t++) begin
      v = {$urandom, $urandom}; k = {$urandom, $urandom};
      apply(2'(t % 3), v, k);
      check(ya == ref_round(t % 3, v, k) && yb == ya, $sformatf("round mode %0d", t % 3));
      check(ypa == 2'(ref_par(128'(ya), 64, 32)) && ypb == 8'(ref_par(128'(yb), 64, 8)), "predicted parity");
      check(!ea && !eb, "verifier on clean data");
    end
    for (int t = 0; t < 50; t++) begin
      v = {$urandom, $urandom}; k = {$urandom, $urandom};
      apply(2'd1, v, k); y1 = ya;
      apply(2'd1, y1, k);
      check(ya == v, "lmid64 involution");
    end
    // corrupted sbox parity entry
    mism = 0;
    for (int i = 0; i < 256; i++) tab_par[i] = ~tab_par[i];
    for (int t = 0; t < 20; t++) begin
      apply(2'd0, {$urandom, $urandom}, {$urandom, $urandom});
      if (ypb != 8'(ref_par(128'(yb), 64, 8)) || eb) mism++;
    end
    check(mism == 20, "inverted sbox parity table not visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

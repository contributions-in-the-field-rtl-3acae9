// tb_nl64: the non-linear key-schedule step against the reference for random 128-bit
// diversified keys at 1 and 2 parity bits per 32 bits: round key, its predicted parity,
// quiet verifiers; a corrupted dkey bit must raise err.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_nl64;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  sbox_t tab; sbox_par_t tab_par;
  logic [127:0] dk; logic [3:0] dpa; logic [7:0] dpb;
  logic [63:0] ra, rb; logic [1:0] rpa; logic [3:0] rpb; logic ea, eb;
  nl64 #(.PG(32)) ua (.dkey(dk), .dkp(dpa), .tab(tab), .tab_par(tab_par), .rk(ra), .rkp(rpa), .err(ea));
  nl64 #(.PG(16)) ub (.dkey(dk), .dkp(dpb), .tab(tab), .tab_par(tab_par), .rk(rb), .rkp(rpb), .err(eb));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [127:0] v;
    ref_gen_sbox();
    for (int i = 0; i < 256; i++) begin tab[i] = ref_sb[i]; tab_par[i] = ^ref_sb[i]; end
    for (int t = 0; t < 200; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      dk = v; dpa = 4'(ref_par(v, 128, 32)); dpb = 8'(ref_par(v, 128, 16)); #1;
      check(ra == ref_nl64(v) && rb == ra, "round key");
      check(rpa == 2'(ref_par(128'(ra), 64, 32)) && rpb == 4'(ref_par(128'(rb), 64, 16)), "round key parity");
      check(!ea && !eb, "verifiers on clean key");
      dk = v ^ (128'h1 << $urandom_range(127, 0)); #1;
      check(ea && eb, "corrupted dkey bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

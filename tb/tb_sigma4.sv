// tb_sigma4: random words through sigma4 at one parity bit per 32 and per 8 bits.
// Output must equal four independent table look-ups, the predicted parity must equal
// the parity of the output, and the verifier must fire exactly when the input parity
// is wrong (a data bit flipped after the parity was computed).
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_sigma4;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  sbox_t tab; sbox_par_t tab_par;
  logic [31:0] x, y32, y8; logic [0:0] xp32, yp32; logic [3:0] xp8, yp8; logic e32, e8;
  sigma4 #(.PG(32)) u32 (.x(x), .xp(xp32), .tab(tab), .tab_par(tab_par), .y(y32), .yp(yp32), .err(e32));
  sigma4 #(.PG(8))  u8  (.x(x), .xp(xp8),  .tab(tab), .tab_par(tab_par), .y(y8),  .yp(yp8),  .err(e8));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [31:0] v;
    ref_gen_sbox();
    for (int i = 0; i < 256; i++) begin tab[i] = ref_sb[i]; tab_par[i] = ^ref_sb[i]; end
    for (int t = 0; t < 400; t++) begin
      v = $urandom;
      x = v; xp32 = 1'(ref_par(128'(v), 32, 32)); xp8 = 4'(ref_par(128'(v), 32, 8));
      if (t % 2 == 1) x = v ^ (32'h1 << $urandom_range(31, 0));
      #1;
      check(y32 == ref_sigma4(x) && y8 == y32, "substitution");
      check(yp32 == 1'(ref_par(128'(y32), 32, 32)), "predicted parity PG32");
      check(yp8 == 4'(ref_par(128'(y8), 32, 8)), "predicted parity PG8");
      check(e32 == (t % 2 == 1) && e8 == (t % 2 == 1), $sformatf("verifier t=%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

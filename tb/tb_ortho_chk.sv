// tb_ortho_chk: orthomorphism and its inverse on random words at 1, 2 and 4 parity
// bits per word: output halves, predicted output parity, the verifier (only present at
// one parity bit per word) and io(or(a)) == a.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_ortho_chk;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic inv; logic [31:0] a, b0, b1, b2;
  logic [0:0] ap0, bp0; logic [1:0] ap1, bp1; logic [3:0] ap2, bp2; logic e0, e1, e2;
  ortho_chk #(.PG(32)) u0 (.inv(inv), .a(a), .ap(ap0), .b(b0), .bp(bp0), .err(e0));
  ortho_chk #(.PG(16)) u1 (.inv(inv), .a(a), .ap(ap1), .b(b1), .bp(bp1), .err(e1));
  ortho_chk #(.PG(8))  u2 (.inv(inv), .a(a), .ap(ap2), .b(b2), .bp(bp2), .err(e2));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [31:0] v, exp_b, fwd; bit bad;
    for (int t = 0; t < 400; t++) begin
      v = $urandom; bad = (t % 4 == 3);
      inv = t[0];
      a = v; ap0 = 1'(ref_par(128'(v), 32, 32)); ap1 = 2'(ref_par(128'(v), 32, 16)); ap2 = 4'(ref_par(128'(v), 32, 8));
      if (bad) a = v ^ (32'h1 << $urandom_range(31, 0));
      #1;
      exp_b = inv ? {a[31:16] ^ a[15:0], a[31:16]} : {a[15:0], a[31:16] ^ a[15:0]};
      check(b0 == exp_b && b1 == exp_b && b2 == exp_b, "data");
      if (!bad) begin
        check(bp0 == 1'(ref_par(128'(exp_b), 32, 32)), "parity PG32");
        check(bp1 == 2'(ref_par(128'(exp_b), 32, 16)), "parity PG16");
        check(bp2 == 4'(ref_par(128'(exp_b), 32, 8)), "parity PG8");
      end
      check(e0 == bad && !e1 && !e2, "verifier");
    end
    // round trip
    for (int t = 0; t < 50; t++) begin
      v = $urandom; inv = 0; a = v; #1; fwd = b0;
      inv = 1; a = fwd; #1;
      check(b0 == v, "io(or(a)) == a");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

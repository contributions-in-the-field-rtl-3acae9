// tb_mu4_chk: mu4 against a matrix product computed with a generic GF(2^8) multiplier,
// on unit vectors and random words; predicted output parity against the real output
// parity at 1, 2 and 4 parity bits per word; verifier against corrupted inputs.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_mu4_chk;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] x, y0, y1, y2;
  logic [0:0] xp0, yp0; logic [1:0] xp1, yp1; logic [3:0] xp2, yp2; logic e0, e1, e2;
  mu4_chk #(.PG(32)) u0 (.x(x), .xp(xp0), .y(y0), .yp(yp0), .err(e0));
  mu4_chk #(.PG(16)) u1 (.x(x), .xp(xp1), .y(y1), .yp(yp1), .err(e1));
  mu4_chk #(.PG(8))  u2 (.x(x), .xp(xp2), .y(y2), .yp(yp2), .err(e2));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [31:0] v; bit bad;
    // known column: mu4 of 0x00000001 is the last matrix column (a, 1, 1, 1)
    x = 32'h00000001; xp0 = 1; xp1 = 2'b01; xp2 = 4'b0001; #1;
    check(y0 == 32'h02010101, $sformatf("unit vector column got %h", y0));
    for (int t = 0; t < 600; t++) begin
      v = (t < 32) ? (32'h1 << t) : $urandom;
      bad = (t >= 32) && (t % 3 == 0);
      x = v; xp0 = 1'(ref_par(128'(v), 32, 32)); xp1 = 2'(ref_par(128'(v), 32, 16)); xp2 = 4'(ref_par(128'(v), 32, 8));
      if (bad) x = v ^ (32'h1 << $urandom_range(31, 0));
      #1;
      check(y0 == ref_mu4(x) && y1 == y0 && y2 == y0, $sformatf("mu4(%h)", x));
      check(yp0 == 1'(ref_par(128'(y0), 32, 32)) && yp1 == 2'(ref_par(128'(y0), 32, 16)) &&
            yp2 == 4'(ref_par(128'(y0), 32, 8)), "predicted parity");
      check(e0 == bad && e1 == bad && e2 == bad, "verifier");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_parity_verifier: random 64-bit words with correct parity bits must pass; flipping
// any one data or parity bit must raise err, at one parity bit per 32 and per 8 bits.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_parity_verifier;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] d; logic [1:0] p32; logic [7:0] p8; logic e32, e8;
  parity_verifier #(.W(64), .PG(32)) u32 (.d(d), .p(p32), .err(e32));
  parity_verifier #(.W(64), .PG(8))  u8  (.d(d), .p(p8),  .err(e8));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [63:0] v;
    for (int t = 0; t < 300; t++) begin
      v = {$urandom, $urandom};
      d = v; p32 = 2'(ref_par(128'(v), 64, 32)); p8 = 8'(ref_par(128'(v), 64, 8)); #1;
      check(!e32 && !e8, "clean word flagged");
      d = v ^ (64'h1 << $urandom_range(63, 0)); #1;
      check(e32 && e8, "single data-bit error missed");
      d = v; p8[$urandom_range(7, 0)] ^= 1'b1; p32[t % 2] ^= 1'b1; #1;
      check(e32 && e8, "parity-bit error missed");
      d = v ^ (64'h3 << 2 * $urandom_range(3, 0)); p32 = 2'(ref_par(128'(v), 64, 32)); p8 = 8'(ref_par(128'(v), 64, 8)); #1;
      check(!e32 && !e8, "double error in one group is invisible to parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

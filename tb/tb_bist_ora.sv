// tb_bist_ora: compacts random 64-bit responses and compares the signature with one
// worked out by the reference fold-and-shift; check with the right golden value gives
// pass, with a wrong one fail; clr resets signature and verdict.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_bist_ora;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic clr = 0, en = 0, chk = 0; logic [63:0] din = 0; logic [23:0] golden = 0, sig; logic pass, fail;
  bist_ora u_dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .din(din), .check(chk),
                  .golden(golden), .sig(sig), .pass(pass), .fail(fail));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [23:0] m;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      clr = 1; @(negedge clk); clr = 0;
      check(!pass && !fail && sig == 0, "clear");
      m = 0;
      for (int i = 0; i < 50; i++) begin
        din = {$urandom, $urandom}; en = 1; @(negedge clk); en = 0;
        m = ref_misr(m, din);
      end
      check(sig == m, "signature");
      golden = (t % 2 == 0) ? m : m ^ 24'(1 << t);
      chk = 1; @(negedge clk); chk = 0;
      check(pass == (t % 2 == 0) && fail == (t % 2 == 1), "verdict");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

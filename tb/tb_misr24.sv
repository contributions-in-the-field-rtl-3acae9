// tb_misr24: random input words against a reference signature register; clr zeroes
// it; without en it holds; one flipped input bit changes the final signature.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_misr24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic clr = 0, en = 0; logic [23:0] d = 0, sig;
  misr24 u_dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .sig(sig));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [23:0] m, seq [100], s1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      clr = 1; @(negedge clk); clr = 0; check(sig == 0, "clear");
      m = 0;
      for (int i = 0; i < 100; i++) begin
        if (pass == 0) seq[i] = 24'($urandom);
        d = seq[i]; if (pass == 1 && i == 37) d = d ^ 24'h000400;
        en = 1; @(negedge clk); en = 0;
        m = {m[22:0], 1'b0} ^ (m[23] ? 24'h00001B : 24'h0) ^ d;
        check(sig == m, $sformatf("step %0d", i));
      end
      repeat (2) @(negedge clk); check(sig == m, "hold");
      if (pass == 0) s1 = sig; else check(sig != s1, "single-bit input error changes signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

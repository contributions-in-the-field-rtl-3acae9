// tb_tpg_ca: the cellular automaton must apply rule 90 (left ^ right) or rule 150
// (left ^ self ^ right, cells 1 and 2) with zero boundaries, checked cell by cell, and
// have period 255 through distinct non-zero states.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_tpg_ca;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic init = 0, en = 0; logic [7:0] q;
  bit seen [256];
  tpg_ca u_dut (.clk(clk), .rst_n(rst_n), .init(init), .en(en), .q(q));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] ca_ref(input logic [7:0] s);
    logic [7:0] n; logic l, r;
    for (int i = 0; i < 8; i++) begin
      l = (i > 0) ? s[i-1] : 1'b0;
      r = (i < 7) ? s[i+1] : 1'b0;
      n[i] = l ^ r ^ ((i == 1 || i == 2) ? s[i] : 1'b0);
    end
    return n;
  endfunction
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] prev; int period, dup;
    repeat (2) @(negedge clk); rst_n = 1;
    period = 0; dup = 0;
    do begin
      prev = q; seen[q] = 1'b1;
      en = 1; @(negedge clk); en = 0;
      period++;
      check(q == ca_ref(prev), $sformatf("step from %h", prev));
      if (q != 8'h01 && seen[q]) dup++;
    end while (q != 8'h01 && period < 300);
    check(period == 255 && dup == 0, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tpg_lfsr: the generator must follow the recurrence of x^8+x^4+x^3+x^2+1 and visit
// all 255 non-zero patterns exactly once before returning to the seed.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_tpg_lfsr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic init = 0, en = 0; logic [7:0] q;
  bit seen [256];
  tpg_lfsr u_dut (.clk(clk), .rst_n(rst_n), .init(init), .en(en), .q(q));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] prev; int period, dup;
    repeat (2) @(negedge clk); rst_n = 1;
    check(q == 8'h01, "seed");
    period = 0; dup = 0;
    do begin
      prev = q; seen[q] = 1'b1;
      en = 1; @(negedge clk); en = 0;
      period++;
      // bit 0 of the new state is the linear recurrence of the old state
      check(q == {prev[6:0], prev[7] ^ prev[3] ^ prev[2] ^ prev[1]}, "step");
      if (q != 8'h01 && seen[q]) dup++;
    end while (q != 8'h01 && period < 300);
    check(period == 255 && dup == 0 && !seen[0], $sformatf("period %0d dup %0d", period, dup));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

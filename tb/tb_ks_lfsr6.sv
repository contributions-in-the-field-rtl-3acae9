// tb_ks_lfsr6: after `load` with round count r, the six registers must hold the LFSR
// outputs LFSR(6(i-1)+j, r), j = 0..5, of round i = 1; each `fwd` clock must move to the
// next round (one full set of six words per clock) and each `bwd` clock back. The
// reference clocks the LFSR one step at a time from the seed. Stored byte parities
// must stay consistent (err low); a forced wrong parity state must raise err.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_ks_lfsr6;
  import nxt_pkg::*;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic load = 0, fwd = 0, bwd = 0; logic [7:0] r = 0;
  logic [5:0][23:0] w; logic [5:0][2:0] wp; logic err;
  ks_lfsr6 u_dut (.clk(clk), .rst_n(rst_n), .load(load), .rounds(r), .fwd(fwd), .bwd(bwd),
                  .word(w), .wpar(wp), .err(err));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic expect_round(input int i, input logic [7:0] rr);
    for (int j = 0; j < 6; j++)
      check(w[j] == ref_lfsr(6*(i-1)+j, rr), $sformatf("r=%0d round %0d word %0d: %h vs %h", rr, i, j, w[j], ref_lfsr(6*(i-1)+j, rr)));
    check(!err, "parity verifier on clean state");
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [7:0] rr;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      rr = (t == 0) ? 8'd16 : (t == 1) ? 8'd255 : 8'($urandom_range(40, 1));
      @(negedge clk); load = 1; r = rr;
      @(negedge clk); load = 0;
      expect_round(1, rr);
      for (int i = 2; i <= 20; i++) begin
        fwd = 1; @(negedge clk); fwd = 0;   // exactly one clock per round
        expect_round(i, rr);
      end
      for (int i = 19; i >= 1; i--) begin
        bwd = 1; @(negedge clk); bwd = 0;
        expect_round(i, rr);
      end
    end
    // a state bit flipped by force: parity must disagree
    force u_dut.word[2][5] = ~u_dut.word[2][5];
    #1 check(err, "flipped LFSR bit not flagged");
    release u_dut.word[2][5];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

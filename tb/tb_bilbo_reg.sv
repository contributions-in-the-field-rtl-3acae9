// tb_bilbo_reg: the four BILBO modes against a reference: parallel load, serial shift
// (with serial output), PRPG stepping on x^64+x^4+x^3+x+1, MISR compaction; init loads
// the seed; en low holds.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_bilbo_reg;
  import bilbo_pkg::*;
  import nxt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic init = 0, en = 0, si = 0, so; bilbo_mode_t mode = BILBO_LOAD; logic [63:0] d = 0, q;
  bilbo_reg #(.W(64), .SEED(64'h1)) u_dut (.clk, .rst_n, .init, .en, .mode, .d, .si, .q, .so);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [63:0] m, v; logic [63:0] sh; int period_hit;
    repeat (2) @(negedge clk); rst_n = 1;
    // load
    for (int i = 0; i < 20; i++) begin
      v = {$urandom, $urandom}; mode = BILBO_LOAD; d = v; en = 1; @(negedge clk);
      check(q == v, "parallel load");
    end
    en = 0; d = '0; repeat (2) @(negedge clk); check(q == v, "hold");
    // shift: 64 bits out on so, 64 new bits in
    m = q; sh = {$urandom, $urandom};
    mode = BILBO_SHIFT; en = 1;
    for (int i = 0; i < 64; i++) begin
      si = sh[63 - i];
      check(so == m[63 - i], "serial out");
      @(negedge clk);
    end
    en = 0; check(q == sh, "serial in");
    // PRPG from the seed
    init = 1; @(negedge clk); init = 0; check(q == 64'h1, "seed");
    m = 64'h1; mode = BILBO_PRPG; en = 1; d = {$urandom, $urandom};
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); m = ref_step64(m);
      check(q == m, "PRPG step");
    end
    // MISR
    mode = BILBO_MISR;
    for (int i = 0; i < 100; i++) begin
      v = {$urandom, $urandom}; d = v; @(negedge clk); m = ref_step64(m) ^ v;
      check(q == m, "MISR step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

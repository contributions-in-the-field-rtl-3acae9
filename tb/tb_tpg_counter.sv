// tb_tpg_counter: reset and init give the seed, en advances by one, no en holds,
// the count wraps after 256 patterns.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_tpg_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic init = 0, en = 0; logic [7:0] q;
  tpg_counter #(.SEED(8'h00)) u_dut (.clk(clk), .rst_n(rst_n), .init(init), .en(en), .q(q));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(q == 8'h00, "seed after reset");
    for (int i = 1; i <= 300; i++) begin
      en = 1; @(negedge clk);
      check(q == 8'(i), $sformatf("pattern %0d", i));
    end
    en = 0; repeat (3) @(negedge clk); check(q == 8'(300), "hold");
    init = 1; en = 1; @(negedge clk); init = 0; en = 0; check(q == 8'h00, "init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

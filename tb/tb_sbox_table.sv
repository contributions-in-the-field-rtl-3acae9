// tb_sbox_table: writes a random permutation one entry per clock, then rewrites some
// entries, and checks every entry and its parity bit.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_sbox_table;
  import nxt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0; always #5 clk = ~clk;
  logic we = 0; logic [7:0] wa = 0, wd = 0; sbox_t tab; sbox_par_t tp;
  logic [7:0] model [256];
  sbox_table u_dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd), .tab(tab), .tab_par(tp));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 256; i++) model[i] = 8'($urandom);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; wa = 8'(i); wd = model[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) check(tab[i] == model[i] && tp[i] == ^model[i], $sformatf("entry %0d", i));
    for (int k = 0; k < 40; k++) begin
      @(negedge clk); we = 1; wa = 8'($urandom); wd = 8'($urandom); model[wa] = wd;
    end
    @(negedge clk); we = 0; wa = 8'h00; wd = ~model[0];
    @(negedge clk);
    for (int i = 0; i < 256; i++) check(tab[i] == model[i] && tp[i] == ^model[i], $sformatf("entry %0d after rewrite", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

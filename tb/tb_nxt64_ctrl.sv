// tb_nxt64_ctrl: control sequences for encryption and decryption with several round
// counts. Encryption: load in the start clock, then r run clocks with lmor64 select
// and forward key steps, the last with lmid64 and no key step, done one clock later.
// Decryption: r-1 key-forward clocks without a round, then r run clocks with lmio64
// select and backward key steps, the last with lmid64. busy must cover the operation.
//
// Origin: The expected values are worked out independently in the reference model or
// in this file; the stimulus, the fault sites and the run lengths are this testbench's
// own choices.
`timescale 1ns/1ps
module tb_nxt64_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic start = 0, decrypt = 0; logic [7:0] rounds = 0;
  logic busy, load, run, last, ks_fwd, ks_bwd, done; logic [1:0] mode;
  nxt64_ctrl u_dut (.clk(clk), .rst_n(rst_n), .start(start), .decrypt(decrypt), .rounds(rounds),
    .busy(busy), .load(load), .run(run), .last(last), .mode(mode), .ks_fwd(ks_fwd),
    .ks_bwd(ks_bwd), .done(done));
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic op(input bit dec, input int r);
    int nrun, nprep, nfwd, nbwd, nlast, lat; bit mode_ok;
    int rr;
    rr = (r == 0) ? 1 : r;
    @(negedge clk); start = 1; decrypt = dec; rounds = 8'(r);
    #1 check(load && !busy, "load in the start clock");
    @(negedge clk); start = 0; decrypt = ~dec;
    nrun = 0; nprep = 0; nfwd = 0; nbwd = 0; nlast = 0; lat = 1; mode_ok = 1;
    while (!done) begin
      check(busy, "busy during operation");
      if (run) begin
        nrun++;
        if (last) begin nlast++; if (mode != 2'd1) mode_ok = 0; end
        else if (mode != (dec ? 2'd2 : 2'd0)) mode_ok = 0;
        if (last && (ks_fwd || ks_bwd)) mode_ok = 0;
      end else if (ks_fwd) nprep++;
      if (ks_fwd) nfwd++;
      if (ks_bwd) nbwd++;
      @(negedge clk); lat++;
    end
    check(!busy, "idle with done");
    check(nrun == rr && nlast == 1 && mode_ok, $sformatf("dec=%0d r=%0d runs %0d last %0d", dec, r, nrun, nlast));
    check(nprep == (dec ? rr - 1 : 0), "prep clocks");
    check(dec ? (nbwd == rr - 1 && nfwd == rr - 1) : (nfwd == rr - 1 && nbwd == 0), "key steps");
    check(lat == (dec ? (rr > 1 ? 2 * rr : 2) : rr + 1), $sformatf("latency %0d", lat));
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    op(0, 16); op(1, 16); op(0, 1); op(1, 1); op(0, 0); op(0, 7); op(1, 3); op(1, 255); op(0, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

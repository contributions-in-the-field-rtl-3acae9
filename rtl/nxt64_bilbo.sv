// nxt64_bilbo: IDEA NXT64 encryption core whose two registers are BILBOs, so that the
// registers themselves become the test pattern generator and the response analyzer.
//
// Functional mode: the data register (round register) and the output register are
// plain parallel-load registers and the core behaves like the iterative core (same
// control unit, key scheduler and round function; r+1 clocks per block, no parity
// channel). Scan mode (scan_en): both registers form one shift chain
// scan_in -> data register -> output register -> scan_out.
//
// Self-test (bt_start): the key is all-zero and every run has TEST_ROUNDS rounds. The
// data register runs as a PRPG and presents a new pseudo-random 64-bit state to the
// round function on every round clock; the output register runs as a MISR and
// compacts the round output (lmor64 on rounds 1..r-1, lmid64 on round r) on every
// round clock. After n_runs runs the 64-bit signature is compared with `golden`;
// bt_pass/bt_fail hold the verdict until the next test and bt_done pulses once.
//
// The round function and key scheduler are the same parity-carrying modules as in the
// concurrently checked core, used unchanged. This core relies on the offline test
// alone, so their predicted parity (y_p) and error flags (e_round, e_ks) are not used;
// lint reports these three signals as unused, and they are left so on purpose.
//
// Origin: A PRPG in place of the round register and a MISR in place of the output
// register follow the source architecture; compacting every round output, the
// polynomial, the scan order and the 64-bit golden input are this design's choices.
module nxt64_bilbo
  import nxt_pkg::*;
  import bilbo_pkg::*;
#(
  parameter logic [7:0] TEST_ROUNDS = 8'd16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sbox_t        tab,
  input  sbox_par_t    tab_par,
  // functional interface
  input  logic         start,
  input  logic [63:0]  pt,
  input  logic [127:0] key,
  input  logic [7:0]   rounds,
  output logic         busy,
  output logic         done,
  output logic [63:0]  ct,
  // scan
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out,
  // self-test
  input  logic         bt_start,
  input  logic [15:0]  n_runs,
  input  logic [63:0]  golden,
  output logic         bt_busy,
  output logic         bt_done,
  output logic         bt_pass,
  output logic         bt_fail
);
  typedef enum logic [1:0] {B_IDLE, B_ISSUE, B_WAIT, B_CHECK} bstate_t;
  bstate_t     bst;
  logic [15:0] run_cnt, nruns_q;

  logic        c_start, c_busy, c_done, load, run, last, ks_fwd, ks_bwd;
  logic [1:0]  mode;
  logic [63:0] dq, y, rk;
  logic [1:0]  dq_p, y_p, rk_p;
  logic        e_round, e_ks, dr_so;
  logic        test;
  bilbo_mode_t dr_mode, or_mode;
  logic        dr_en, or_en, t_init;

  assign test    = (bst != B_IDLE);
  assign bt_busy = test;
  assign t_init  = (bst == B_IDLE) && bt_start && !c_busy;
  assign c_start = test ? (bst == B_ISSUE) : (start && !bt_start);

  nxt64_ctrl u_ctrl (.clk(clk), .rst_n(rst_n), .start(c_start), .decrypt(1'b0),
                     .rounds(test ? TEST_ROUNDS : rounds), .busy(c_busy), .load(load),
                     .run(run), .last(last), .mode(mode), .ks_fwd(ks_fwd),
                     .ks_bwd(ks_bwd), .done(c_done));

  nxt64_keysched #(.PG(32)) u_ks (.clk(clk), .rst_n(rst_n), .load(load),
                                  .key(test ? 128'd0 : key),
                                  .rounds(test ? TEST_ROUNDS : rounds),
                                  .fwd(ks_fwd), .bwd(ks_bwd), .tab(tab), .tab_par(tab_par),
                                  .rk(rk), .rkp(rk_p), .err(e_ks));

  parity_gen #(.W(64), .PG(32)) u_dpar (.d(dq), .p(dq_p));

  nxt64_round #(.PG(32)) u_round (.mode(mode), .x(dq), .xp(dq_p), .rk(rk), .rkp(rk_p),
                                  .tab(tab), .tab_par(tab_par),
                                  .y(y), .yp(y_p), .err(e_round));

  always_comb begin
    if (scan_en) begin
      dr_mode = BILBO_SHIFT;  or_mode = BILBO_SHIFT;
      dr_en   = 1'b1;         or_en   = 1'b1;
    end else if (test) begin
      dr_mode = BILBO_PRPG;   or_mode = BILBO_MISR;
      dr_en   = run;          or_en   = run;
    end else begin
      dr_mode = BILBO_LOAD;   or_mode = BILBO_LOAD;
      dr_en   = load || (run && !last);
      or_en   = last;
    end
  end

  bilbo_reg #(.W(64), .SEED(64'h1)) u_dr (.clk(clk), .rst_n(rst_n), .init(t_init), .en(dr_en),
                                          .mode(dr_mode), .d(load ? pt : y), .si(scan_in),
                                          .q(dq), .so(dr_so));
  bilbo_reg #(.W(64), .SEED(64'h0)) u_or (.clk(clk), .rst_n(rst_n), .init(t_init), .en(or_en),
                                          .mode(or_mode), .d(y), .si(dr_so),
                                          .q(ct), .so(scan_out));

  assign busy = c_busy || test;
  assign done = c_done && !test;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst     <= B_IDLE;
      run_cnt <= '0;
      nruns_q <= '0;
      bt_done <= 1'b0;
      bt_pass <= 1'b0;
      bt_fail <= 1'b0;
    end else begin
      bt_done <= 1'b0;
      unique case (bst)
        B_IDLE: if (t_init) begin
          nruns_q <= (n_runs == 16'd0) ? 16'd1 : n_runs;
          run_cnt <= '0;
          bt_pass <= 1'b0;
          bt_fail <= 1'b0;
          bst     <= B_ISSUE;
        end
        B_ISSUE: bst <= B_WAIT;
        B_WAIT: if (c_done) begin
          run_cnt <= run_cnt + 16'd1;
          bst     <= (run_cnt + 16'd1 == nruns_q) ? B_CHECK : B_ISSUE;
        end
        B_CHECK: begin
          bt_pass <= (ct == golden);
          bt_fail <= (ct != golden);
          bt_done <= 1'b1;
          bst     <= B_IDLE;
        end
        default: bst <= B_IDLE;
      endcase
    end
  end
endmodule

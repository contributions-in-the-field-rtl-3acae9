// nxt64_core: iterative IDEA NXT64 (64-bit block, 128-bit key) encryption/decryption
// core with a concurrent parity-based error-detection channel.
//
// Structure: an input multiplexer chooses the plaintext on the first iteration and the
// round output afterwards; the data register holds the current state; one nxt64_round
// instance computes a round per clock; the key scheduler delivers that round's key in
// the same clock; the control unit counts rounds; the result of the final lmid64 round
// goes to the output register. Every register carries one parity bit per PG data bits.
//
// Interface: pulse `start` with pt, key, rounds and decrypt while `busy` is low. `done`
// pulses when `ct` holds the result: r+1 clocks after start for encryption, 2r clocks
// for decryption. `rnd_valid`/`rnd_out` show each intermediate round result as it is
// written into the data register (used for round-level signature testing).
// `ced_err_now` is the OR of every parity verifier in the clock it fires (including one
// on the data register and one on the output register); `ced_err` is the same, held
// from the clock after it fires until the next `start`.
//
// Origin: The MUX / data register / round / key scheduler / control unit structure
// follows the cipher's iterative hardware form and the parity channel follows the
// source's concurrent scheme; the verifiers on the two registers and the start/done
// handshake are this design's additions.
module nxt64_core
  import nxt_pkg::*;
#(
  parameter int unsigned PG = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  logic [63:0]  pt,
  input  logic [127:0] key,
  input  logic [7:0]   rounds,
  input  sbox_t        tab,
  input  sbox_par_t    tab_par,
  output logic         busy,
  output logic         done,
  output logic [63:0]  ct,
  output logic         rnd_valid,
  output logic [63:0]  rnd_out,
  output logic         ced_err_now,
  output logic         ced_err
);
  localparam int unsigned NP = 64 / PG;

  logic          load, run, last, ks_fwd, ks_bwd;
  logic [1:0]    mode;
  logic [63:0]   dreg, y, rk;
  logic [NP-1:0] dreg_p, y_p, rk_p, pt_p, ct_p;
  logic          e_round, e_ks, e_dreg, e_ct, ct_valid;

  nxt64_ctrl u_ctrl (.clk(clk), .rst_n(rst_n), .start(start), .decrypt(decrypt),
                     .rounds(rounds), .busy(busy), .load(load), .run(run), .last(last),
                     .mode(mode), .ks_fwd(ks_fwd), .ks_bwd(ks_bwd),
                     .done(done));

  nxt64_keysched #(.PG(PG)) u_ks (.clk(clk), .rst_n(rst_n), .load(load), .key(key),
                                  .rounds(rounds), .fwd(ks_fwd), .bwd(ks_bwd),
                                  .tab(tab), .tab_par(tab_par),
                                  .rk(rk), .rkp(rk_p), .err(e_ks));

  parity_gen #(.W(64), .PG(PG)) u_ptpar (.d(pt), .p(pt_p));

  nxt64_round #(.PG(PG)) u_round (.mode(mode), .x(dreg), .xp(dreg_p), .rk(rk), .rkp(rk_p),
                                  .tab(tab), .tab_par(tab_par),
                                  .y(y), .yp(y_p), .err(e_round));

  // input multiplexer and data register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dreg   <= '0;
      dreg_p <= '0;
    end else if (load) begin
      dreg   <= pt;
      dreg_p <= pt_p;
    end else if (run && !last) begin
      dreg   <= y;
      dreg_p <= y_p;
    end
  end

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct       <= '0;
      ct_p     <= '0;
      ct_valid <= 1'b0;
    end else if (last) begin
      ct       <= y;
      ct_p     <= y_p;
      ct_valid <= 1'b1;
    end
  end

  parity_verifier #(.W(64), .PG(PG)) u_vd (.d(dreg), .p(dreg_p), .err(e_dreg));
  parity_verifier #(.W(64), .PG(PG)) u_vc (.d(ct),   .p(ct_p),   .err(e_ct));

  assign ced_err_now = (run && (e_round || e_ks || e_dreg)) || (ct_valid && e_ct);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           ced_err <= 1'b0;
    else if (load)        ced_err <= 1'b0;
    else if (ced_err_now) ced_err <= 1'b1;
  end

  // round-level observation port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd_valid <= 1'b0;
      rnd_out   <= '0;
    end else begin
      rnd_valid <= run && !last;
      rnd_out   <= y;
    end
  end
endmodule

// nxt64_round: one IDEA NXT64 round function with its parity channel.
//
//   f32(x, rk0||rk1) = sigma4( mu4( sigma4(x ^ rk0) ) ^ rk1 ) ^ rk0
//   t      = f32(x_l ^ x_r, rk)
//   lmid64 : y = (x_l ^ t) || (x_r ^ t)
//   lmor64 : y = or(x_l ^ t) || (x_r ^ t)      (encryption rounds 1..r-1)
//   lmio64 : y = io(x_l ^ t) || (x_r ^ t)      (decryption rounds)
//
// Parity bits (one per PG bits) travel beside the data: XOR layers XOR parities; the two
// sbox layers take their output parity from the sbox parity table; mu4 and the
// orthomorphism have predictors. Verifiers in front of them OR into err. The round is
// purely combinational; the caller registers y and yp.
//
// Origin: The round equations follow the cipher and the parity channel follows the
// source's concurrent scheme; one instance serving all three round forms, rather than
// separate lmor64 and lmid64 blocks, is this design's choice.
module nxt64_round
  import nxt_pkg::*;
#(
  parameter int unsigned PG = 32
) (
  input  logic [1:0]       mode,     // 0: lmor64, 1: lmid64, 2: lmio64
  input  logic [63:0]      x,
  input  logic [64/PG-1:0] xp,
  input  logic [63:0]      rk,
  input  logic [64/PG-1:0] rkp,
  input  sbox_t            tab,
  input  sbox_par_t        tab_par,
  output logic [63:0]      y,
  output logic [64/PG-1:0] yp,
  output logic             err
);
  localparam int unsigned NH = 32 / PG;

  logic [31:0]   xl, xr, rk0, rk1, a, u, s1, m, v, s2, f, zl, zr, ol;
  logic [NH-1:0] xlp, xrp, rk0p, rk1p, ap, up, s1p, mp, vp, s2p, fp, zlp, zrp, olp;
  logic          e_s1, e_mu, e_s2, e_or;

  assign {xl, xr}     = x;
  assign {xlp, xrp}   = xp;
  assign {rk0, rk1}   = rk;
  assign {rk0p, rk1p} = rkp;

  // f32 input and key addition
  assign a  = xl ^ xr;
  assign ap = xlp ^ xrp;
  assign u  = a ^ rk0;
  assign up = ap ^ rk0p;

  sigma4  #(.PG(PG)) u_s1 (.x(u), .xp(up), .tab(tab), .tab_par(tab_par), .y(s1), .yp(s1p), .err(e_s1));
  mu4_chk #(.PG(PG)) u_mu (.x(s1), .xp(s1p), .y(m), .yp(mp), .err(e_mu));

  assign v  = m ^ rk1;
  assign vp = mp ^ rk1p;

  sigma4  #(.PG(PG)) u_s2 (.x(v), .xp(vp), .tab(tab), .tab_par(tab_par), .y(s2), .yp(s2p), .err(e_s2));

  assign f  = s2 ^ rk0;
  assign fp = s2p ^ rk0p;

  // Lai-Massey combination
  assign zl  = xl ^ f;
  assign zr  = xr ^ f;
  assign zlp = xlp ^ fp;
  assign zrp = xrp ^ fp;

  ortho_chk #(.PG(PG)) u_or (.inv(mode == 2'd2), .a(zl), .ap(zlp), .b(ol), .bp(olp), .err(e_or));

  always_comb begin
    if (mode == 2'd1) begin
      y   = {zl, zr};
      yp  = {zlp, zrp};
      err = e_s1 | e_mu | e_s2;
    end else begin
      y   = {ol, zr};
      yp  = {olp, zrp};
      err = e_s1 | e_mu | e_s2 | e_or;
    end
  end
endmodule

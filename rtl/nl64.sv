// nl64: non-linear part of the 64-bit key scheduler. It turns the 128-bit
// diversified key dkey = d0||d1||d2||d3 (32-bit words) into one 64-bit round key:
//
//   s_i = mu4(sigma4(d_i))            four parallel substitution + diffusion
//   m   = mix64(s0..s3)               m_i = s_i ^ (s0^s1^s2^s3)
//   t_i = sigma4(m_i)                 second substitution layer
//   h   = (t0||t1) ^ (t2||t3)         reduction to 64 bits
//   rk  = lmid64(lmor64(h, dkey[127:64]), dkey[63:0])
//
// The parity channel runs through every step with the same predictors and verifiers as
// the datapath; mix64 and the reduction are linear, so their parities are XORs of the
// input parities. Combinational.
//
// Origin: The order of the stages follows the cipher's key schedule; the mix64
// formula, the fold to 64 bits and the absence of a complementation step are this
// design's choices, since the exact forms are not spelled out by the source.
module nl64
  import nxt_pkg::*;
#(
  parameter int unsigned PG = 32
) (
  input  logic [127:0]      dkey,
  input  logic [128/PG-1:0] dkp,
  input  sbox_t             tab,
  input  sbox_par_t         tab_par,
  output logic [63:0]       rk,
  output logic [64/PG-1:0]  rkp,
  output logic              err
);
  localparam int unsigned NH = 32 / PG;

  logic [3:0][31:0]   d, s, mu, mx, t;
  logic [3:0][NH-1:0] dp, sp, mup, mxp, tp;
  logic [3:0]         e_a, e_b, e_c;
  logic [31:0]        sum;
  logic [NH-1:0]      sump;
  logic [63:0]        h, g;
  logic [64/PG-1:0]   hp, gp;
  logic               e_or, e_mid;

  // d[3] is the most significant word
  assign d  = dkey;
  assign dp = dkp;

  for (genvar i = 0; i < 4; i++) begin : g_w
    sigma4  #(.PG(PG)) u_sa (.x(d[i]), .xp(dp[i]), .tab(tab), .tab_par(tab_par),
                             .y(s[i]), .yp(sp[i]), .err(e_a[i]));
    mu4_chk #(.PG(PG)) u_mu (.x(s[i]), .xp(sp[i]), .y(mu[i]), .yp(mup[i]), .err(e_b[i]));
    assign mx[i]  = mu[i] ^ sum;
    assign mxp[i] = mup[i] ^ sump;
    sigma4  #(.PG(PG)) u_sb (.x(mx[i]), .xp(mxp[i]), .tab(tab), .tab_par(tab_par),
                             .y(t[i]), .yp(tp[i]), .err(e_c[i]));
  end

  assign sum  = mu[0] ^ mu[1] ^ mu[2] ^ mu[3];
  assign sump = mup[0] ^ mup[1] ^ mup[2] ^ mup[3];

  assign h  = {t[3], t[2]} ^ {t[1], t[0]};
  assign hp = {tp[3], tp[2]} ^ {tp[1], tp[0]};

  nxt64_round #(.PG(PG)) u_or (.mode(2'd0), .x(h), .xp(hp),
                               .rk(dkey[127:64]), .rkp(dkp[128/PG-1 -: 64/PG]),
                               .tab(tab), .tab_par(tab_par), .y(g), .yp(gp), .err(e_or));
  nxt64_round #(.PG(PG)) u_md (.mode(2'd1), .x(g), .xp(gp),
                               .rk(dkey[63:0]), .rkp(dkp[64/PG-1:0]),
                               .tab(tab), .tab_par(tab_par), .y(rk), .yp(rkp), .err(e_mid));

  assign err = (|e_a) | (|e_b) | (|e_c) | e_or | e_mid;
endmodule

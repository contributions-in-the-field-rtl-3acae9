// nxt_ref_pkg: behavioural reference model of IDEA NXT64 used by the testbenches.
// Written independently of the RTL: GF(2^8) products by shift-and-add, mu4 by its
// matrix, the key-schedule LFSR by clocking it c times one step at a time from the
// seed 0x6A || r || ~r, and the round keys recomputed from scratch for every round.
//
// Origin: The cipher equations follow the published cipher. The mix64 form and the
// byte order mirror the choices made in the RTL, and the sbox is a random permutation
// loaded into both, so this model checks the RTL against those choices rather than
// against official test vectors.
package nxt_ref_pkg;

  logic [7:0] ref_sb [256];

  // random permutation of 0..255 (Fisher-Yates)
  function automatic void ref_gen_sbox();
    int j;
    logic [7:0] t;
    for (int i = 0; i < 256; i++) ref_sb[i] = 8'(i);
    for (int i = 255; i > 0; i--) begin
      j = int'($urandom_range(i, 0));
      t = ref_sb[i]; ref_sb[i] = ref_sb[j]; ref_sb[j] = t;
    end
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h1F9 << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [31:0] ref_mu4(input logic [31:0] x);
    logic [7:0] m [4][4];
    logic [7:0] xi [4], yi [4];
    m[0] = '{8'h01, 8'h01, 8'h01, 8'h02};
    m[1] = '{8'h01, 8'hFD, 8'h02, 8'h01};
    m[2] = '{8'hFD, 8'h02, 8'h01, 8'h01};
    m[3] = '{8'h02, 8'h01, 8'hFD, 8'h01};
    for (int i = 0; i < 4; i++) xi[i] = x[31-8*i -: 8];
    for (int i = 0; i < 4; i++) begin
      yi[i] = 8'h00;
      for (int j = 0; j < 4; j++) yi[i] ^= gmul(m[i][j], xi[j]);
    end
    return {yi[0], yi[1], yi[2], yi[3]};
  endfunction

  function automatic logic [31:0] ref_sigma4(input logic [31:0] x);
    return {ref_sb[x[31:24]], ref_sb[x[23:16]], ref_sb[x[15:8]], ref_sb[x[7:0]]};
  endfunction

  function automatic logic [31:0] ref_f32(input logic [31:0] x, input logic [63:0] rk);
    logic [31:0] k0, k1;
    k0 = rk[63:32];
    k1 = rk[31:0];
    return ref_sigma4(ref_mu4(ref_sigma4(x ^ k0)) ^ k1) ^ k0;
  endfunction

  // mode 0 lmor64, 1 lmid64, 2 lmio64
  function automatic logic [63:0] ref_round(input int mode, input logic [63:0] x, input logic [63:0] rk);
    logic [31:0] l, r, t;
    logic [15:0] a, b;
    t = ref_f32(x[63:32] ^ x[31:0], rk);
    l = x[63:32] ^ t;
    r = x[31:0] ^ t;
    {a, b} = l;
    if (mode == 0) l = {b, a ^ b};
    if (mode == 2) l = {a ^ b, a};
    return {l, r};
  endfunction

  function automatic logic [23:0] ref_lfsr(input int c, input logic [7:0] r);
    logic [23:0] reg_v;
    reg_v = {8'h6A, r, ~r};
    for (int p = 0; p < c; p++) begin
      if ((reg_v & 24'h800000) != 24'h0) reg_v = (reg_v << 1) ^ 24'h00001B;
      else                               reg_v = reg_v << 1;
    end
    return reg_v;
  endfunction

  function automatic logic [127:0] ref_dkey(input logic [127:0] mkey, input int i, input logic [7:0] r);
    logic [127:0] d;
    logic [23:0]  w;
    d = mkey;
    for (int j = 0; j < 5; j++) d[127-24*j -: 24] ^= ref_lfsr((i-1)*6 + j, r);
    w = ref_lfsr((i-1)*6 + 5, r);
    d[7:0] ^= w[23:16];
    return d;
  endfunction

  function automatic logic [63:0] ref_nl64(input logic [127:0] dk);
    logic [31:0] w [4], s [4], t;
    logic [63:0] h;
    for (int i = 0; i < 4; i++) w[i] = dk[127-32*i -: 32];
    for (int i = 0; i < 4; i++) s[i] = ref_mu4(ref_sigma4(w[i]));
    t = s[0] ^ s[1] ^ s[2] ^ s[3];
    for (int i = 0; i < 4; i++) s[i] = ref_sigma4(s[i] ^ t);
    h = {s[0], s[1]} ^ {s[2], s[3]};
    h = ref_round(0, h, dk[127:64]);
    return ref_round(1, h, dk[63:0]);
  endfunction

  function automatic logic [63:0] ref_rk(input logic [127:0] key, input int i, input logic [7:0] r);
    return ref_nl64(ref_dkey(key, i, r));
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [127:0] key, input int r);
    logic [63:0] x;
    int rr;
    rr = (r == 0) ? 1 : r;
    x = pt;
    for (int i = 1; i < rr; i++) x = ref_round(0, x, ref_rk(key, i, 8'(r)));
    return ref_round(1, x, ref_rk(key, rr, 8'(r)));
  endfunction

  function automatic logic [63:0] ref_decrypt(input logic [63:0] ct, input logic [127:0] key, input int r);
    logic [63:0] x;
    x = ct;
    for (int i = r; i > 1; i--) x = ref_round(2, x, ref_rk(key, i, 8'(r)));
    return ref_round(1, x, ref_rk(key, 1, 8'(r)));
  endfunction

  // parity of each pg-bit group of a w-bit value, group 0 at the bottom
  function automatic logic [15:0] ref_par(input logic [127:0] v, input int w, input int pg);
    logic [15:0] p;
    p = '0;
    for (int k = 0; k < w/pg; k++)
      for (int b = 0; b < pg; b++) p[k] ^= v[k*pg + b];
    return p;
  endfunction

  // 24-bit MISR step on x^24+x^4+x^3+x+1 with a folded 64-bit input
  function automatic logic [23:0] ref_misr(input logic [23:0] s, input logic [63:0] d);
    logic [23:0] n;
    n = {s[22:0], 1'b0};
    if (s[23]) n ^= 24'h00001B;
    return n ^ d[23:0] ^ d[47:24] ^ {8'h00, d[63:48]};
  endfunction

  // n-th pattern (n = 0 is the seed) of the 8-bit generators: 0 counter, 1 LFSR, 2 CA
  function automatic logic [7:0] ref_tpg(input int sel, input int n);
    logic [7:0] s, t;
    s = (sel == 0) ? 8'h00 : 8'h01;
    for (int k = 0; k < n; k++) begin
      if (sel == 0) s = s + 8'd1;
      else if (sel == 1) s = {s[6:0], s[7] ^ s[3] ^ s[2] ^ s[1]};
      else begin
        for (int i = 0; i < 8; i++)
          t[i] = ((i > 0) ? s[i-1] : 1'b0) ^ ((i < 7) ? s[i+1] : 1'b0) ^ ((i == 1 || i == 2) ? s[i] : 1'b0);
        s = t;
      end
    end
    return s;
  endfunction

  // signature of the offline self-test of the main core: mode 0 BIST, 1 feedback
  // loop; level 0 ciphertexts only, 1 every intermediate round output as well
  function automatic logic [23:0] ref_bist_sig(input int mode, input int level, input int sel,
                                              input int nruns, input int r, input bit dec = 1'b0);
    logic [23:0] m;
    logic [63:0] x, pt, ct;
    m = '0;
    ct = '0;
    for (int n = 0; n < nruns; n++) begin
      pt = (mode == 1 && n > 0) ? ct : {8{ref_tpg(sel, n)}};
      x = pt;
      for (int i = 1; i < r; i++) begin
        x = dec ? ref_round(2, x, ref_rk('0, r + 1 - i, 8'(r))) : ref_round(0, x, ref_rk('0, i, 8'(r)));
        if (level == 1) m = ref_misr(m, x);
      end
      ct = ref_round(1, x, ref_rk('0, dec ? 1 : r, 8'(r)));
      m = ref_misr(m, ct);
    end
    return m;
  endfunction

  function automatic logic [63:0] ref_step64(input logic [63:0] q);
    return {q[62:0], 1'b0} ^ (q[63] ? 64'h1B : 64'h0);
  endfunction

  // signature of the BILBO self-test: the round register runs as a PRPG from 1 and
  // steps on every round clock, the output register compacts every round output
  function automatic logic [63:0] ref_bilbo_sig(input int nruns, input int r);
    logic [63:0] g, m, y;
    g = 64'h1;
    m = '0;
    for (int n = 0; n < nruns; n++)
      for (int i = 1; i <= r; i++) begin
        y = ref_round((i < r) ? 0 : 1, g, ref_rk('0, i, 8'(r)));
        m = ref_step64(m) ^ y;
        g = ref_step64(g);
      end
    return m;
  endfunction

endpackage

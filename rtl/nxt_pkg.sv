// nxt_pkg: types, constants and pure functions shared by the IDEA NXT64 (FOX64)
// datapath, key scheduler and the error-detection logic.
//
// Byte order: a 32-bit word x0||x1||x2||x3 keeps x0 in bits [31:24]; a 64-bit block
// keeps its left half in bits [63:32]. GF(2^8) arithmetic uses the field polynomial
// x^8+x^7+x^6+x^5+x^4+x^3+1 and the constant c = x^7+x^6+x^5+x^4+x^3+x^2+1 given
// for the mu4 diffusion. The 24-bit key-schedule LFSR uses x^24 = x^4+x^3+x+1
// (feedback constant 0x00001B) and is started from 0x6A || r || ~r.
// lfsr_step6 is the six-steps-in-one update that lets the key scheduler produce
// one round key per clock instead of one every six clocks.
//
// Origin: The constants and polynomials follow the cipher and its key-scheduler speed-
// up; the byte order is this design's reading.
package nxt_pkg;

  localparam int unsigned N_LFSR  = 6;      // ceil(128/24) LFSR words per round key

  localparam logic [7:0]  GF_POLY_LOW = 8'hF9;      // x^7+x^6+x^5+x^4+x^3+1
  localparam logic [7:0]  GF_C        = 8'hFD;      // c(x)
  localparam logic [23:0] LFSR_FB     = 24'h00001B; // x^4+x^3+x+1
  localparam logic [7:0]  LFSR_INIT_HI = 8'h6A;

  // Substitution table (loadable) and its per-entry output parity look-up table.
  typedef logic [255:0][7:0] sbox_t;
  typedef logic [255:0]      sbox_par_t;

  // multiply by the monomial x modulo the field polynomial
  function automatic logic [7:0] xalpha(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? GF_POLY_LOW : 8'h00);
  endfunction

  // multiply by c(x) = x^7+x^6+x^5+x^4+x^3+x^2+1, as a sum of shifted copies
  function automatic logic [7:0] xc(input logic [7:0] a);
    logic [7:0] acc, p;
    acc = '0;
    p   = a;
    for (int k = 0; k < 8; k++) begin
      if (GF_C[k]) acc ^= p;
      p = xalpha(p);
    end
    return acc;
  endfunction

  // mu4 linear multipermutation on four bytes, matrix rows
  // (1 1 1 a) (1 c a 1) (c a 1 1) (a 1 c 1)
  function automatic logic [31:0] mu4(input logic [31:0] x);
    logic [7:0] x0, x1, x2, x3;
    {x0, x1, x2, x3} = x;
    return { x0 ^ x1 ^ x2 ^ xalpha(x3),
             x0 ^ xc(x1) ^ xalpha(x2) ^ x3,
             xc(x0) ^ xalpha(x1) ^ x2 ^ x3,
             xalpha(x0) ^ x1 ^ xc(x2) ^ x3 };
  endfunction

  // orthomorphism: (a_l, a_r) -> (a_r, a_l ^ a_r), 16-bit halves
  function automatic logic [31:0] ortho(input logic [31:0] a);
    return {a[15:0], a[31:16] ^ a[15:0]};
  endfunction

  // one LFSR clock
  function automatic logic [23:0] lfsr_step1(input logic [23:0] r);
    return {r[22:0], 1'b0} ^ (r[23] ? LFSR_FB : 24'h0);
  endfunction

  // six LFSR clocks at once: reg * x^6 modulo x^24+x^4+x^3+x+1
  function automatic logic [23:0] lfsr_step6(input logic [23:0] r);
    logic [23:0] n;
    n[0]  = r[18];
    n[1]  = r[18] ^ r[19];
    n[2]  = r[19] ^ r[20];
    n[3]  = r[18] ^ r[20] ^ r[21];
    n[4]  = r[18] ^ r[19] ^ r[21] ^ r[22];
    n[5]  = r[19] ^ r[20] ^ r[22] ^ r[23];
    n[6]  = r[0]  ^ r[20] ^ r[21] ^ r[23];
    n[7]  = r[1]  ^ r[21] ^ r[22];
    n[8]  = r[2]  ^ r[22] ^ r[23];
    n[9]  = r[3]  ^ r[23];
    n[23:10] = r[17:4];
    return n;
  endfunction

  function automatic logic [23:0] lfsr_init(input logic [7:0] rounds);
    return {LFSR_INIT_HI, rounds, ~rounds};
  endfunction

endpackage

// mu4_chk: the mu4 diffusion layer (a linear multipermutation over GF(2^8), matrix
// rows (1 1 1 a) (1 c a 1) (c a 1 1) (a 1 c 1)) with its output parity predictor.
//
// Because mu4 is linear, the parity of each output byte is an XOR of selected input
// bits: for coefficient 1 all 8 bits of the input byte, for a (xalpha) and c (xc) a
// fixed mask worked out at elaboration as the parity of the product with each basis
// byte. The byte parities are merged into groups of PG bits. The predictor reads the
// data bits, so a verifier first checks the input word against its parity (err).
// Combinational.
//
// Origin: The xalpha/xc units, the field polynomial, the constant c and a predictor
// built from input bits follow the source architecture; the matrix is the published
// FOX mu4 matrix, and the mask form of the predictor is this design's.
module mu4_chk
  import nxt_pkg::*;
#(
  parameter int unsigned PG = 32
) (
  input  logic [31:0]      x,
  input  logic [32/PG-1:0] xp,
  output logic [31:0]      y,
  output logic [32/PG-1:0] yp,
  output logic             err
);
  // mask m with parity(f(v)) = ^(v & m) for a GF(2)-linear byte map f
  function automatic logic [7:0] par_mask_alpha();
    logic [7:0] m;
    for (int k = 0; k < 8; k++) m[k] = ^xalpha(8'(1 << k));
    return m;
  endfunction
  function automatic logic [7:0] par_mask_c();
    logic [7:0] m;
    for (int k = 0; k < 8; k++) m[k] = ^xc(8'(1 << k));
    return m;
  endfunction
  localparam logic [7:0] MA = par_mask_alpha();
  localparam logic [7:0] MC = par_mask_c();
  localparam logic [7:0] M1 = 8'hFF;

  logic [7:0] x0, x1, x2, x3;
  logic [3:0] bp;   // bp[3] = parity of y0 (most significant byte)
  assign {x0, x1, x2, x3} = x;
  assign y = mu4(x);

  assign bp[3] = ^{x0 & M1, x1 & M1, x2 & M1, x3 & MA};
  assign bp[2] = ^{x0 & M1, x1 & MC, x2 & MA, x3 & M1};
  assign bp[1] = ^{x0 & MC, x1 & MA, x2 & M1, x3 & M1};
  assign bp[0] = ^{x0 & MA, x1 & M1, x2 & MC, x3 & M1};

  parity_fold     #(.W(32), .PG(PG)) u_fold (.bp(bp), .p(yp));
  parity_verifier #(.W(32), .PG(PG)) u_ver  (.d(x), .p(xp), .err(err));
endmodule

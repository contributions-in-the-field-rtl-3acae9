// sigma4: substitution layer of the f32 function: four parallel 8-bit sbox look-ups
// on x0||x1||x2||x3, with its parity-channel logic.
//
// The output parity of an sbox cannot be derived from its input parity, so it is taken
// from the sbox parity look-up table (one bit per entry) and merged into groups of PG
// bits. Before that prediction is trusted, a verifier checks the incoming word against
// its incoming parity bits (err). Combinational.
//
// Origin: Follows the source architecture: four sboxes, one parity look-up per sbox,
// the byte parities summed, and an input verifier.
module sigma4
  import nxt_pkg::*;
#(
  parameter int unsigned PG = 32
) (
  input  logic [31:0]      x,
  input  logic [32/PG-1:0] xp,
  input  sbox_t            tab,
  input  sbox_par_t        tab_par,
  output logic [31:0]      y,
  output logic [32/PG-1:0] yp,
  output logic             err
);
  logic [3:0] bp;
  always_comb begin
    for (int b = 0; b < 4; b++) begin
      y[8*b +: 8] = tab[x[8*b +: 8]];
      bp[b]       = tab_par[x[8*b +: 8]];
    end
  end
  parity_fold     #(.W(32), .PG(PG)) u_fold (.bp(bp), .p(yp));
  parity_verifier #(.W(32), .PG(PG)) u_ver  (.d(x), .p(xp), .err(err));
endmodule

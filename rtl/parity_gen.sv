// parity_gen: even-parity generator for a W-bit word split into groups of PG bits.
// Parity bit k covers bits [k*PG +: PG], so bit 0 protects the least significant group.
// Purely combinational. PG = 32, 16 or 8 gives the three redundancy levels of the
// concurrent error-detection scheme (1, 2 or 4 parity bits per 32 data bits).
//
// Origin: The three group sizes follow the source architecture; even parity and the
// group order are this design's choices.
module parity_gen #(
  parameter int unsigned W  = 32,
  parameter int unsigned PG = 32
) (
  input  logic [W-1:0]    d,
  output logic [W/PG-1:0] p
);
  always_comb begin
    for (int k = 0; k < W/PG; k++) p[k] = ^d[k*PG +: PG];
  end
endmodule

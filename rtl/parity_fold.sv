// parity_fold: combines per-byte parity bits into parity bits for groups of PG bits
// (PG a multiple of 8). Used by the predictors, which work out the parity of each
// output byte and then merge bytes into the redundancy level in use.
//
// Origin: A helper of this design.
module parity_fold #(
  parameter int unsigned W  = 32,
  parameter int unsigned PG = 32
) (
  input  logic [W/8-1:0]  bp,
  output logic [W/PG-1:0] p
);
  localparam int unsigned BPG = PG / 8;
  always_comb begin
    for (int k = 0; k < W/PG; k++) p[k] = ^bp[k*BPG +: BPG];
  end
endmodule

// parity_verifier: checks a W-bit word against the parity bits carried beside it in
// the parity channel. It recomputes the parity of every PG-bit group with an XOR tree
// (depth log2(PG)) and raises err when any group disagrees. Combinational.
// Verifiers sit in front of every unit whose output parity cannot be carried through
// from its input parity (sbox layers, mu4, the 1-bit-per-32 orthomorphism), so that a
// prediction is never made from corrupted inputs.
//
// Origin: The XOR-tree verifier and its placement follow the source architecture.
module parity_verifier #(
  parameter int unsigned W  = 32,
  parameter int unsigned PG = 32
) (
  input  logic [W-1:0]    d,
  input  logic [W/PG-1:0] p,
  output logic            err
);
  logic [W/PG-1:0] pc;
  parity_gen #(.W(W), .PG(PG)) u_gen (.d(d), .p(pc));
  assign err = |(pc ^ p);
endmodule

// tpg_ca: 8-cell one-dimensional cellular automaton used as a pseudo-random test
// pattern generator. Each cell sees only itself and its two neighbours, with constant
// 0 beyond both ends (null boundary). Cells whose bit is set in RULE150 follow rule 150
// (left ^ self ^ right); the others follow rule 90 (left ^ right). With the default
// RULE150 = 8'h06 (cells 1 and 2) the automaton has maximal period 255 from any
// non-zero SEED. `init` loads SEED, `en` advances one step.
//
// Origin: An 8-cell cellular-automaton generator follows the source architecture; the
// rule assignment, the null boundary reading and the seed are this design's choices.
module tpg_ca #(
  parameter logic [7:0] SEED    = 8'h01,
  parameter logic [7:0] RULE150 = 8'h06
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       en,
  output logic [7:0] q
);
  logic [7:0] nxt;
  logic [9:0] ext;   // q with a 0 cell on either side
  assign ext = {1'b0, q, 1'b0};
  always_comb begin
    for (int i = 0; i < 8; i++)
      nxt[i] = ext[i] ^ ext[i+2] ^ (RULE150[i] & q[i]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (init) q <= SEED;
    else if (en)   q <= nxt;
  end
endmodule

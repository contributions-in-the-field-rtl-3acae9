// tpg_lfsr: 8-bit standard (external-XOR) LFSR used as a pseudo-random test pattern
// generator. Characteristic polynomial x^8+x^4+x^3+x^2+1 (primitive), so from any
// non-zero SEED it visits all 255 non-zero patterns before repeating. The feedback bit
// is the XOR of stages 7, 3, 2 and 1 and enters stage 0 while the register shifts up.
// `init` loads SEED, `en` advances one step.
//
// Origin: An 8-bit LFSR generator in standard form follows the source architecture;
// the polynomial is this design's choice (the cipher's field polynomial is not
// primitive).
module tpg_lfsr #(
  parameter logic [7:0] SEED = 8'h01
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       en,
  output logic [7:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (init) q <= SEED;
    else if (en)   q <= {q[6:0], q[7] ^ q[3] ^ q[2] ^ q[1]};
  end
endmodule

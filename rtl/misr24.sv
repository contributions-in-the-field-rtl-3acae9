// misr24: 24-stage multiple-input signature register built on the key-schedule LFSR
// polynomial x^24+x^4+x^3+x+1. On `en` the register is shifted one place with the
// feedback XORed into stages 0, 1, 3 and 4, and the 24 parallel input bits are XORed
// into the stages: sig <= (sig * x mod p(x)) ^ d. `clr` zeroes the signature.
//
// Origin: A 24-stage MISR on the key-schedule polynomial follows the source
// architecture; feeding one input bit into every stage is this design's choice.
module misr24
  import nxt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [23:0] d,
  output logic [23:0] sig
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= lfsr_step1(sig) ^ d;
  end
endmodule

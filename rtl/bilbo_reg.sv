// bilbo_reg: W-bit built-in logic block observer. One register with four modes:
// parallel load (q <= d), shift (q <= {q[W-2:0], si}, so = q[W-1]), pseudo-random
// pattern generation (q <= q * x mod p(x)) and signature compaction
// (q <= (q * x mod p(x)) ^ d). The feedback polynomial is x^W + x^4 + x^3 + x + 1
// (TAPS = 0x1B in the low bits), the same tap pattern as the cipher's key-schedule
// LFSR; for W = 64 it is primitive. The register changes only when `en` is high.
// `init` loads SEED (a non-zero start for the generator), taking priority over `en`.
//
// Origin: The four modes follow the source architecture; the feedback polynomial, the
// seed and `init` taking priority are this design's choices.
module bilbo_reg
  import bilbo_pkg::*;
#(
  parameter int unsigned   W    = 64,
  parameter logic [W-1:0]  TAPS = W'(8'h1B),
  parameter logic [W-1:0]  SEED = W'(1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  bilbo_mode_t mode,
  input  logic [W-1:0] d,
  input  logic        si,
  output logic [W-1:0] q,
  output logic        so
);
  logic [W-1:0] stepped;
  assign stepped = {q[W-2:0], 1'b0} ^ (q[W-1] ? TAPS : '0);
  assign so      = q[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (init) q <= SEED;
    else if (en) begin
      unique case (mode)
        BILBO_LOAD:  q <= d;
        BILBO_SHIFT: q <= {q[W-2:0], si};
        BILBO_PRPG:  q <= stepped;
        BILBO_MISR:  q <= stepped ^ d;
        default:     q <= d;
      endcase
    end
  end
endmodule

// tpg_counter: 8-bit binary up-counter used as a test pattern generator for the
// offline self-test. `init` loads SEED, `en` advances to the next pattern. The pattern
// in `q` is valid from reset/init on. This is the cheapest of the three generators.
//
// Origin: An 8-bit counter generator follows the source architecture; the start value
// is this design's choice.
module tpg_counter #(
  parameter logic [7:0] SEED = 8'h00
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
    else if (en)   q <= q + 8'd1;
  end
endmodule

// bist_ora: output response analyzer of the offline self-test. Each 64-bit response
// presented with `en` is folded to 24 bits (bits 23:0 ^ 47:24 ^ 63:48) and compacted
// into a misr24 signature. `check` compares the signature with the golden signature
// and latches the verdict: `pass` or `fail` is set the clock after `check` and holds
// until `clr`.
//
// Origin: Signature analysis in a MISR and the compare against a golden signature
// follow the source architecture; the 64-to-24-bit fold and the verdict timing are
// this design's choices.
module bist_ora (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [63:0] din,
  input  logic        check,
  input  logic [23:0] golden,
  output logic [23:0] sig,
  output logic        pass,
  output logic        fail
);
  logic [23:0] fold;
  assign fold = din[23:0] ^ din[47:24] ^ {8'h00, din[63:48]};

  misr24 u_misr (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(fold), .sig(sig));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass <= 1'b0;
      fail <= 1'b0;
    end else if (clr) begin
      pass <= 1'b0;
      fail <= 1'b0;
    end else if (check) begin
      pass <= (sig == golden);
      fail <= (sig != golden);
    end
  end
endmodule

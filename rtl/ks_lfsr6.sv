// ks_lfsr6: the diversification LFSR of the key scheduler, rebuilt to deliver one
// complete set of LFSR words per clock.
//
// Round i of the 128-bit key schedule needs the six consecutive LFSR outputs
// LFSR(6(i-1)+j), j = 0..5: five 24-bit words and the top byte of a sixth. A plain
// LFSR needs six clocks for that. Here six registers hold the six words at once;
// register j is loaded with init * x^j (init = 0x6A || r || ~r) and every `fwd` clock
// multiplies each register by x^6 modulo x^24+x^4+x^3+x+1 in one step, so a new set of
// words, and hence a new round key, is ready every clock. `bwd` multiplies by x^-6
// instead, which walks the schedule backwards for decryption.
//
// Parity: each register carries one parity bit per byte. The next-state byte parities
// are predicted from the current state bits with fixed masks (the step is linear), and
// a verifier compares the stored parities with the state every clock (err).
//
// Origin: The seed, the feedback polynomial, the six-steps-in-one update and one
// parity bit per LFSR byte follow the source design; the six-register arrangement, the
// backward step for decryption and the mask-based parity prediction are how this
// design realises them.
module ks_lfsr6
  import nxt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [7:0]            rounds,
  input  logic                  fwd,
  input  logic                  bwd,
  output logic [N_LFSR-1:0][23:0] word,
  output logic [N_LFSR-1:0][2:0]  wpar,
  output logic                  err
);
  function automatic logic [23:0] back1(input logic [23:0] n);
    return {n[0], n[23:1] ^ (n[0] ? LFSR_FB[23:1] : 23'h0)};
  endfunction

  function automatic logic [23:0] back6(input logic [23:0] n);
    logic [23:0] r;
    r = n;
    for (int k = 0; k < 6; k++) r = back1(r);
    return r;
  endfunction

  typedef logic [2:0][23:0] pmask_t;

  function automatic pmask_t masks(input bit backward);
    pmask_t m;
    logic [23:0] img;
    for (int k = 0; k < 24; k++) begin
      img = backward ? back6(24'(1 << k)) : lfsr_step6(24'(1 << k));
      for (int b = 0; b < 3; b++) m[b][k] = ^img[8*b +: 8];
    end
    return m;
  endfunction

  localparam pmask_t MF = masks(1'b0);
  localparam pmask_t MB = masks(1'b1);

  logic [N_LFSR-1:0][23:0] init_w;
  logic [N_LFSR-1:0][2:0]  init_p;

  always_comb begin
    logic [23:0] r;
    r = lfsr_init(rounds);
    for (int j = 0; j < N_LFSR; j++) begin
      init_w[j] = r;
      for (int b = 0; b < 3; b++) init_p[j][b] = ^r[8*b +: 8];
      r = lfsr_step1(r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      wpar <= '0;
    end else if (load) begin
      word <= init_w;
      wpar <= init_p;
    end else if (fwd) begin
      for (int j = 0; j < N_LFSR; j++) begin
        word[j] <= lfsr_step6(word[j]);
        for (int b = 0; b < 3; b++) wpar[j][b] <= ^(word[j] & MF[b]);
      end
    end else if (bwd) begin
      for (int j = 0; j < N_LFSR; j++) begin
        word[j] <= back6(word[j]);
        for (int b = 0; b < 3; b++) wpar[j][b] <= ^(word[j] & MB[b]);
      end
    end
  end

  // verifier over all six registers
  always_comb begin
    err = 1'b0;
    for (int j = 0; j < N_LFSR; j++)
      for (int b = 0; b < 3; b++)
        err |= (^word[j][8*b +: 8]) ^ wpar[j][b];
  end
endmodule

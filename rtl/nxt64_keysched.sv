// nxt64_keysched: key scheduler for IDEA NXT64 with a 128-bit key, producing one 64-bit
// round key per clock.
//
// The key length equals the extended length ek = 128, so padding leaves the key
// unchanged and the mixing step is not applied: mkey is the key register. The
// diversification step XORs mkey, seen as five 24-bit words from the top and one
// residue byte at the bottom, with LFSR words 0..4 and the top byte of LFSR word 5
// (ks_lfsr6). nl64 turns the result (dkey) into the round key in the same clock.
//
// Interface: `load` captures key and round count and selects round 1; `fwd` moves to
// the next round, `bwd` to the previous one. rk/rkp are combinational from the
// registers. Parity: key bytes get parity at load; dkey byte parities are key byte
// parities XOR LFSR byte parities, merged into PG-bit groups. err ORs the LFSR
// verifier and all nl64 verifiers.
//
// Origin: Diversification with the LFSR words and the nl64 step follow the cipher;
// taking word 0 from the most significant end is this design's reading. Padding and
// mixing for keys shorter than 128 bits are not implemented.
module nxt64_keysched
  import nxt_pkg::*;
#(
  parameter int unsigned PG = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [127:0]      key,
  input  logic [7:0]        rounds,
  input  logic              fwd,
  input  logic              bwd,
  input  sbox_t             tab,
  input  sbox_par_t         tab_par,
  output logic [63:0]       rk,
  output logic [64/PG-1:0]  rkp,
  output logic              err
);
  logic [127:0]             mkey;
  logic [15:0]              mkey_bp;
  logic [15:0]              key_bp;
  logic [N_LFSR-1:0][23:0]  lw;
  logic [N_LFSR-1:0][2:0]   lp;
  logic [127:0]             lfsr_cat, dkey;
  logic [15:0]              lfsr_bp, dkey_bp;
  logic [128/PG-1:0]        dkp;
  logic                     e_lfsr, e_nl;

  parity_gen #(.W(128), .PG(8)) u_kpar (.d(key), .p(key_bp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mkey    <= '0;
      mkey_bp <= '0;
    end else if (load) begin
      mkey    <= key;
      mkey_bp <= key_bp;
    end
  end

  ks_lfsr6 u_lfsr (.clk(clk), .rst_n(rst_n), .load(load), .rounds(rounds),
                   .fwd(fwd), .bwd(bwd), .word(lw), .wpar(lp), .err(e_lfsr));

  // word 0 lines up with the most significant 24 bits of mkey
  assign lfsr_cat = {lw[0], lw[1], lw[2], lw[3], lw[4], lw[5][23:16]};
  assign lfsr_bp  = {lp[0], lp[1], lp[2], lp[3], lp[4], lp[5][2]};
  assign dkey     = mkey ^ lfsr_cat;
  assign dkey_bp  = mkey_bp ^ lfsr_bp;

  parity_fold #(.W(128), .PG(PG)) u_fold (.bp(dkey_bp), .p(dkp));

  nl64 #(.PG(PG)) u_nl (.dkey(dkey), .dkp(dkp), .tab(tab), .tab_par(tab_par),
                        .rk(rk), .rkp(rkp), .err(e_nl));

  assign err = e_lfsr | e_nl;
endmodule

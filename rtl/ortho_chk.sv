// ortho_chk: the orthomorphism of the Lai-Massey round, or(a_l||a_r) = a_r || (a_l^a_r)
// on 16-bit halves, or its inverse io(a_l||a_r) = (a_l^a_r) || a_l when inv = 1, with
// the output parity prediction.
//
// With two or more parity bits per 32 bits (PG <= 16) the output parity follows from the
// input parity alone: the groups of the copied half are copied and the groups of the
// XORed half are XORed. With one parity bit per 32 bits (PG = 32) the output parity is
// parity(a_l) for `or` and parity(a_r) for `io`, which needs the data bits, so a
// verifier checks the input first (err); for PG <= 16 err is never raised.
// Combinational.
//
// Origin: The prediction parity(a_l) and dropping the verifier when 2 or more parity
// bits cover a word follow the source architecture; the prediction parity(a_r) for the
// inverse is derived here in the same way.
module ortho_chk #(
  parameter int unsigned PG = 32
) (
  input  logic             inv,
  input  logic [31:0]      a,
  input  logic [32/PG-1:0] ap,
  output logic [31:0]      b,
  output logic [32/PG-1:0] bp,
  output logic             err
);
  localparam int unsigned NH = 32 / PG;
  assign b = inv ? {a[31:16] ^ a[15:0], a[31:16]} : {a[15:0], a[31:16] ^ a[15:0]};

  if (PG == 32) begin : g_one
    assign bp[0] = inv ? ^a[15:0] : ^a[31:16];
    parity_verifier #(.W(32), .PG(32)) u_ver (.d(a), .p(ap), .err(err));
  end else begin : g_multi
    localparam int unsigned HALF = NH / 2;
    logic [HALF-1:0] pl, pr;
    assign pl = ap[NH-1:HALF];
    assign pr = ap[HALF-1:0];
    assign bp  = inv ? {pl ^ pr, pl} : {pr, pl ^ pr};
    assign err = 1'b0;
  end
endmodule

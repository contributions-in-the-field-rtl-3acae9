// sbox_table: the loadable 256 x 8 substitution table shared by every sbox instance of
// the cipher, plus the sbox output-parity look-up table used by the concurrent checker.
//
// IDEA NXT allows the standard substitution table to be replaced by individual tables,
// loaded at run time; this design always takes its table from here. One entry is
// written per clock (we, waddr, wdata). The parity LUT entry is written in the same
// clock as even parity of wdata and is stored separately, so a fault that corrupts a
// table entry shows as a parity mismatch on the checked path. The whole table is
// presented combinationally on `tab`/`tab_par`; every sbox reads it with its own mux.
// The table is not cleared by reset: it must be loaded before the first encryption.
//
// Origin: Replaceable tables and a parity look-up table beside the sboxes follow the
// cipher and the source's concurrent scheme; having no built-in table contents is this
// design's choice.
module sbox_table
  import nxt_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [7:0] waddr,
  input  logic [7:0] wdata,
  output sbox_t      tab,
  output sbox_par_t  tab_par
);
  always_ff @(posedge clk) begin
    if (we) begin
      tab[waddr]     <= wdata;
      tab_par[waddr] <= ^wdata;
    end
  end
endmodule

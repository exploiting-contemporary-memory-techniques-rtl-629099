// Address mapping of the two-dimensional data memory onto the memory modules.
//
// Row y goes to module y mod NMOD, so two adjacent rows can be accessed in
// parallel on the two module buses. Inside a module the row r = y / NMOD and
// the 32-word segment s = x / 32 select the bank (r + s) mod NBANKS, so rows of
// one module sit in different banks (interleaved access), and a row is a run of
// horizontally neighbouring banks: a burst must not cross a 32-word segment.
// The column is x mod 32 and the page inside the bank is {s, r / NBANKS}.
// Alternating rows between modules and spreading rows over banks follow the
// described architecture; the exact bank and page formula is this design's.
//
// Purely combinational.
module addr_map
  import mompda_pkg::*;
(
  input  xcoord_t          x,
  input  ycoord_t          y,
  output logic             module_sel,
  output logic [BANKW-1:0] bank,
  output logic [PAGEW-1:0] page,
  output logic [COLW-1:0]  col
);
  logic [ROWW-1:0] row;
  logic [SEGW-1:0] seg;
  logic [BANKW-1:0] row_lo, seg_lo;

  always_comb begin
    module_sel = y[0];
    row        = y[YW-1:1];
    seg        = x[XW-1:COLW];
    col        = x[COLW-1:0];
    row_lo     = BANKW'(row);
    seg_lo     = BANKW'(seg);
    bank       = row_lo + seg_lo;
    page       = {seg, row[ROWW-1:BANKW]};
  end
endmodule

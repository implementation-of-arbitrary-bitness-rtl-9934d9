// ocsu_inv_cascade -- cascade that implements the inverse permutation F^-1.
//
// Takes the tables of the direct machine as parameters, builds the tables of
// the inverse machine from them at elaboration time (ocsu_invert.svh: per
// state row, output column v holds the input symbol that the direct machine
// maps to v, and the next state of that same direct cell) and runs a cascade
// of R inverse structural units. Started from the same initial state as the
// direct cascade, it gives back the original word: F^-1(F(x)) = x. This works
// because the inverse unit at position k sees the same state as the direct one
// did: both move to the next state stored in the same direct cell.
//
// The inversion rule follows the published method; deriving the tables at
// elaboration instead of storing them is this design's choice.
//
// Interface: y[R] permuted symbols and s_in (the direct machine's initial
// state) in; x[R] recovered symbols and s_out out. Symbol k sits at bits
// [k*d +: d]. Timing: purely combinational, R table levels deep.
module ocsu_inv_cascade #(
  parameter int unsigned N = ocsu_pkg::N,
  parameter int unsigned M = ocsu_pkg::M,
  parameter int unsigned R = ocsu_pkg::R,
  parameter int unsigned DIR_OUT  [M*N] = ocsu_pkg::DIR_OUT,
  parameter int unsigned DIR_NEXT [M*N] = ocsu_pkg::DIR_NEXT,
  localparam int unsigned D = $clog2(N),
  localparam int unsigned W = $clog2(M)
) (
  input  logic [R-1:0][D-1:0] y,      // permuted word, y[0] first
  input  logic [W-1:0]        s_in,   // initial state (same as the direct one)
  output logic [R-1:0][D-1:0] x,      // recovered word
  output logic [W-1:0]        s_out   // state after the last unit
);

  `include "ocsu_invert.svh"

  localparam inv_table_t INV_OUT  = invert_out(DIR_OUT);
  localparam inv_table_t INV_NEXT = invert_next(DIR_OUT, DIR_NEXT);

  ocsu_cascade #(
    .N(N), .M(M), .R(R), .OUT_TBL(INV_OUT), .NEXT_TBL(INV_NEXT)
  ) u_cascade (
    .x(y), .s_in(s_in), .y(x), .s_out(s_out)
  );

endmodule

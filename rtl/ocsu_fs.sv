// ocsu_fs -- state function f_s of one structural unit (combinational).
//
// Gives the side output of a structural unit, the next state
// s' = f_s(x, s) = NEXT_TBL[s*N + x], which feeds the side input of the following
// unit of the cascade. Like f_o it is a ROM addressed by {s, x}: w boolean
// functions of d + w variables. The default table is the 12-state example machine.
//
// State codes M..2**W-1 are not states; this design reads them as state 0.
//
// The structure and the example table follow the published method; the
// coding and the rule for unused codes are this design's choices.
//
// Interface: x, s in; s_next out. Timing: purely combinational.
module ocsu_fs #(
  parameter int unsigned N = ocsu_pkg::N,
  parameter int unsigned M = ocsu_pkg::M,
  parameter int unsigned NEXT_TBL [M*N] = ocsu_pkg::DIR_NEXT,
  localparam int unsigned D = $clog2(N),
  localparam int unsigned W = $clog2(M)
) (
  input  logic [D-1:0] x,       // primary input symbol
  input  logic [W-1:0] s,       // side input: current state code
  output logic [W-1:0] s_next   // side output: next state code
);

  // The table becomes a 2**(W+D)-entry ROM addressed by {s, x}; rows of the
  // unused state codes repeat row 0.
  typedef logic [W-1:0] rom_t [2**(W+D)];

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 2**(W+D); a++)
      r[a] = W'(NEXT_TBL[((a / int'(N)) < int'(M) ? (a / int'(N)) : 0) * int'(N) + a % int'(N)]);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign s_next = ROM[{s, x}];

endmodule

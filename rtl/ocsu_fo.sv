// ocsu_fo -- output function f_o of one structural unit (combinational).
//
// A structural unit is one step of a Mealy machine built as logic: its primary
// input carries an input symbol x (d bits), its side input the current state s
// (w bits), and f_o gives the primary output symbol y = f_o(x, s). The function
// is a table lookup, OUT_TBL[s*N + x], held as a ROM addressed by {s, x}:
// d boolean functions of d + w variables (one LUT each when d + w <= 6). For the cascade
// to be a permutation every row of OUT_TBL must be a permutation of the
// alphabet; elaboration stops with an error otherwise. The default table is the 8-symbol, 12-state example machine.
//
// State codes M..2**W-1 are not states; this design reads them as state 0 so
// that the function is fully defined.
//
// The cell structure and the example tables follow the published method;
// the binary coding of symbols and states and the rule for unused codes are
// this design's choices.
//
// Interface: x, s in; y out. Timing: purely combinational, one LUT level.
module ocsu_fo #(
  parameter int unsigned N = ocsu_pkg::N,
  parameter int unsigned M = ocsu_pkg::M,
  parameter int unsigned OUT_TBL [M*N] = ocsu_pkg::DIR_OUT,
  localparam int unsigned D = $clog2(N),
  localparam int unsigned W = $clog2(M)
) (
  input  logic [D-1:0] x,  // primary input symbol
  input  logic [W-1:0] s,  // side input: current state code
  output logic [D-1:0] y   // primary output symbol
);

  // The table becomes a 2**(W+D)-entry ROM addressed by {s, x}; rows of the
  // unused state codes repeat row 0.
  typedef logic [D-1:0] rom_t [2**(W+D)];

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 2**(W+D); a++)
      r[a] = D'(OUT_TBL[((a / int'(N)) < int'(M) ? (a / int'(N)) : 0) * int'(N) + a % int'(N)]);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  // The cascade is a bijection only if, for every state, f_o maps the
  // alphabet onto itself: each row of OUT_TBL must hold every symbol once.
  function automatic bit rows_are_permutations();
    bit ok;
    int unsigned hits;
    ok = 1'b1;
    for (int st = 0; st < int'(M); st++)
      for (int v = 0; v < int'(N); v++) begin
        hits = 0;
        for (int c = 0; c < int'(N); c++)
          if (OUT_TBL[st*int'(N) + c] == v) hits++;
        if (hits != 1) ok = 1'b0;
      end
    return ok;
  endfunction

  if (!rows_are_permutations()) begin : g_bad_table
    $error("ocsu_fo: a row of OUT_TBL is not a permutation of the alphabet");
  end

  assign y = ROM[{s, x}];

endmodule

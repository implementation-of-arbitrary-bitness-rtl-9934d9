// ocsu_cascade -- unidirectional one-dimensional cascade of R structural units.
//
// The cascade computes the permutation F of R symbols. Unit 1 receives the
// first symbol x[0] and, at its side input, the initial state s_in; unit k
// receives symbol x[k-1] and the state left by unit k-1. Unit k drives output
// symbol y[k-1]. The state chain therefore runs the Mealy machine over the R
// symbols in one combinational pass, and y is the machine's output sequence.
// When every output table row is a permutation of the alphabet the map x -> y
// is a bijection on all n**R words, i.e. a permutation of bitness R*d.
//
// s_out, the side output of the last unit, is brought out so that cascades
// can be chained into a longer one (feed it into the next cascade's s_in).
// The default is R = 8 units of the example machine (a 24-bit permutation).
//
// The chain itself follows the published method; R = 8, the word packing
// and the s_out port for chaining are this design's choices.
//
// Interface: x[R] symbols and s_in in; y[R] symbols and s_out out; symbol k
// sits at bits [k*d +: d] of the packed words.
// Timing: purely combinational, R table levels deep (delay R * t_LUT).
module ocsu_cascade #(
  parameter int unsigned N = ocsu_pkg::N,
  parameter int unsigned M = ocsu_pkg::M,
  parameter int unsigned R = ocsu_pkg::R,
  parameter int unsigned OUT_TBL  [M*N] = ocsu_pkg::DIR_OUT,
  parameter int unsigned NEXT_TBL [M*N] = ocsu_pkg::DIR_NEXT,
  localparam int unsigned D = $clog2(N),
  localparam int unsigned W = $clog2(M)
) (
  input  logic [R-1:0][D-1:0] x,      // input word, x[0] is the first symbol
  input  logic [W-1:0]        s_in,   // initial state at the first unit
  output logic [R-1:0][D-1:0] y,      // permuted word
  output logic [W-1:0]        s_out   // state after the last unit
);

  logic [R:0][W-1:0] s;  // s[k]: side signal entering unit k+1

  assign s[0] = s_in;

  for (genvar k = 0; k < int'(R); k++) begin : g_su
    ocsu_su #(.N(N), .M(M), .OUT_TBL(OUT_TBL), .NEXT_TBL(NEXT_TBL)) u_su (
      .x(x[k]), .s(s[k]), .y(y[k]), .s_next(s[k+1])
    );
  end

  assign s_out = s[R];

endmodule

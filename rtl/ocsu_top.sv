// ocsu_top -- permutation engine: direct and inverse cascades plus a stream unit.
//
// Three independent datapaths built on one Mealy machine (by default the
// 8-symbol, 12-state example machine):
//   * a direct cascade of R structural units, x_in -> y_out = F(x_in), a
//     combinational permutation of R*d bits (24 bits by default);
//   * an inverse cascade, y_in -> x_out = F^-1(y_in), whose tables are derived
//     from the direct ones, so that F^-1(F(x)) = x;
//   * a sequential unit that applies F or F^-1 to a message of any length,
//     one symbol per clock (ocsu_stream).
// Both cascades start from the machine's initial state S0 at the side input of
// their first unit. Their final states are brought out so that a longer
// permutation can be formed by chaining further cascades outside.
//
// The cascades follow the published method; gathering the three datapaths
// into one top, the fixed initial state and the stream handshake are this
// design's choices.
//
// Symbol k of a word is at bits [k*d +: d]; symbol 0 enters the first unit.
// Timing: the cascades are combinational (R table levels); the stream unit
// has one clock of latency and takes one symbol every clock.
module ocsu_top #(
  parameter int unsigned N  = ocsu_pkg::N,
  parameter int unsigned M  = ocsu_pkg::M,
  parameter int unsigned R  = ocsu_pkg::R,
  parameter int unsigned S0 = ocsu_pkg::S0,
  parameter int unsigned DIR_OUT  [M*N] = ocsu_pkg::DIR_OUT,
  parameter int unsigned DIR_NEXT [M*N] = ocsu_pkg::DIR_NEXT,
  localparam int unsigned D = $clog2(N),
  localparam int unsigned W = $clog2(M)
) (
  // direct cascade
  input  logic [R-1:0][D-1:0] x_in,
  output logic [R-1:0][D-1:0] y_out,
  output logic [W-1:0]        dir_state_out,
  // inverse cascade
  input  logic [R-1:0][D-1:0] y_in,
  output logic [R-1:0][D-1:0] x_out,
  output logic [W-1:0]        inv_state_out,
  // stream unit
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic                inverse,
  input  logic [D-1:0]        in_sym,
  output logic                out_valid,
  output logic [D-1:0]        out_sym,
  output logic [W-1:0]        stream_state
);

  ocsu_cascade #(
    .N(N), .M(M), .R(R), .OUT_TBL(DIR_OUT), .NEXT_TBL(DIR_NEXT)
  ) u_direct (
    .x(x_in), .s_in(W'(S0)), .y(y_out), .s_out(dir_state_out)
  );

  ocsu_inv_cascade #(
    .N(N), .M(M), .R(R), .DIR_OUT(DIR_OUT), .DIR_NEXT(DIR_NEXT)
  ) u_inverse (
    .y(y_in), .s_in(W'(S0)), .x(x_out), .s_out(inv_state_out)
  );

  ocsu_stream #(
    .N(N), .M(M), .S0(S0), .DIR_OUT(DIR_OUT), .DIR_NEXT(DIR_NEXT)
  ) u_stream (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .inverse(inverse), .in_sym(in_sym), .out_valid(out_valid),
    .out_sym(out_sym), .state(stream_state)
  );

endmodule

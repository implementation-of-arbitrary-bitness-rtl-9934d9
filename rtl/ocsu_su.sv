// ocsu_su -- one structural unit (SU) of the cascade.
//
// Two combinational circuits side by side, both fed from the primary input x
// and the side input s: f_o (ocsu_fo) makes the primary output y and f_s
// (ocsu_fs) the side output s_next, the state handed to the next unit. This is
// exactly one step of the Mealy machine with output table OUT_TBL and state
// table NEXT_TBL. The defaults are the 8-symbol, 12-state example machine.
//
// The split into an output circuit and a state circuit, both fed from the
// primary and the side input, follows the published method.
//
// Interface: x, s in; y, s_next out. Timing: combinational, one table level.
module ocsu_su #(
  parameter int unsigned N = ocsu_pkg::N,
  parameter int unsigned M = ocsu_pkg::M,
  parameter int unsigned OUT_TBL  [M*N] = ocsu_pkg::DIR_OUT,
  parameter int unsigned NEXT_TBL [M*N] = ocsu_pkg::DIR_NEXT,
  localparam int unsigned D = $clog2(N),
  localparam int unsigned W = $clog2(M)
) (
  input  logic [D-1:0] x,       // primary input symbol
  input  logic [W-1:0] s,       // side input (state from the previous unit)
  output logic [D-1:0] y,       // primary output symbol
  output logic [W-1:0] s_next   // side output (state to the next unit)
);

  ocsu_fo #(.N(N), .M(M), .OUT_TBL(OUT_TBL))   u_fo (.x(x), .s(s), .y(y));
  ocsu_fs #(.N(N), .M(M), .NEXT_TBL(NEXT_TBL)) u_fs (.x(x), .s(s), .s_next(s_next));

endmodule

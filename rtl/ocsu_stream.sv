// ocsu_stream -- the permutation machine run sequentially, one symbol a clock.
//
// The cascade unrolls a Mealy machine in space; this block runs the same
// machine in time, for messages of any length. It holds the output and state
// tables, together as one ROM per direction, and a w-bit state register. Per
// accepted symbol it reads both tables at (state, symbol) and writes the new
// state, which is the whole per-symbol work of the method. A message of r
// symbols streamed through it gives the same r output symbols as an
// r-unit cascade started from the same initial state.
//
// Both directions are built in: the inverse tables are derived from the direct
// ones at elaboration (ocsu_invert.svh). The direction is chosen per message.
//
// Interface (all synchronous to clk, active-low synchronous reset rst_n):
//   in_valid  a symbol is presented on in_sym this cycle (no back-pressure;
//             a cycle without in_valid leaves the state untouched)
//   in_first  the symbol opens a new message: the machine restarts from S0,
//             and inverse is sampled as the message's direction
//   inverse   0 = direct permutation F, 1 = inverse permutation F^-1
//   out_valid / out_sym   the result symbol, one cycle after its input
//   state     the current state register (state after the last symbol)
// Timing: throughput one symbol per clock, latency one clock.
// Choices of this design: the valid/first handshake, the registered output
// and the per-message direction bit; reset puts the machine in S0.
module ocsu_stream #(
  parameter int unsigned N  = ocsu_pkg::N,
  parameter int unsigned M  = ocsu_pkg::M,
  parameter int unsigned S0 = ocsu_pkg::S0,
  parameter int unsigned DIR_OUT  [M*N] = ocsu_pkg::DIR_OUT,
  parameter int unsigned DIR_NEXT [M*N] = ocsu_pkg::DIR_NEXT,
  localparam int unsigned D = $clog2(N),
  localparam int unsigned W = $clog2(M)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         inverse,
  input  logic [D-1:0] in_sym,
  output logic         out_valid,
  output logic [D-1:0] out_sym,
  output logic [W-1:0] state
);

  `include "ocsu_invert.svh"

  localparam inv_table_t INV_OUT  = invert_out(DIR_OUT);
  localparam inv_table_t INV_NEXT = invert_next(DIR_OUT, DIR_NEXT);

  // One ROM per direction, addressed by {state, symbol}; each entry is
  // {next state, output symbol}. Rows of unused state codes repeat row 0.
  typedef logic [W+D-1:0] rom_t [2**(W+D)];

  function automatic rom_t build_rom(inv_table_t out_tbl, inv_table_t next_tbl);
    rom_t r;
    int st;
    for (int a = 0; a < 2**(W+D); a++) begin
      st   = (a / int'(N)) < int'(M) ? (a / int'(N)) : 0;
      r[a] = {W'(next_tbl[st*int'(N) + a % int'(N)]), D'(out_tbl[st*int'(N) + a % int'(N)])};
    end
    return r;
  endfunction

  localparam rom_t DIR_ROM = build_rom(DIR_OUT, DIR_NEXT);
  localparam rom_t INV_ROM = build_rom(INV_OUT, INV_NEXT);

  logic [W-1:0] state_q;
  logic         mode_q;      // direction of the message in progress
  logic [W-1:0] cur_state;
  logic         cur_mode;
  logic [D-1:0] sym_d;
  logic [W-1:0] state_d;

  always_comb begin
    cur_state = in_first ? W'(S0) : state_q;
    cur_mode  = in_first ? inverse : mode_q;
    if (cur_mode) {state_d, sym_d} = INV_ROM[{cur_state, in_sym}];
    else          {state_d, sym_d} = DIR_ROM[{cur_state, in_sym}];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= W'(S0);
      mode_q    <= 1'b0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state_q <= state_d;
        mode_q  <= cur_mode;
        out_sym <= sym_d;
      end
    end
  end

  assign state = state_q;

endmodule

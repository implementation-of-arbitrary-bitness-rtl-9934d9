// ocsu_pkg -- shared sizes and tables of the example permutation machine.
//
// The design implements a permutation of r symbols of d bits each with a
// one-dimensional cascade of structural units (OCSU). Every structural unit is
// the combinational image of one step of a Mealy machine with an n-symbol
// alphabet and m states. This package holds the default machine: n = 8 input
// and output symbols (d = 3 bits) and m = 12 states (w = 4 bits), with its
// output table (f_o) and state table (f_s).
//
// The tables are written 1-based, as the example machine is published
// (symbol x_1 / y_1 / state s_1 is entry 1), and converted to the 0-based codes
// the hardware uses: symbol x_k is coded k-1 and state s_k is coded k-1. The
// tables of the inverse machine are not stored here; modules that need them
// derive them from the direct tables (see ocsu_invert.svh).
//
// Choices of this design, not fixed by the method: the initial state s_1
// (code 0) and a default cascade length of R = 8 structural units (24 bits).
package ocsu_pkg;

  localparam int unsigned N  = 8;          // alphabet size n (input = output)
  localparam int unsigned M  = 12;         // number of states m
  localparam int unsigned D  = $clog2(N);  // bits per symbol, d = log2 n
  localparam int unsigned W  = $clog2(M);  // bits per state code, w = ceil(log2 m)
  localparam int unsigned R  = 8;          // structural units in a cascade
  localparam int unsigned S0 = 0;          // initial state code (s_1)

  typedef int unsigned table_t [M*N];      // entry [s*N + x]: state s, symbol x

  // Output table f_o, one row of 8 per state s_1..s_12, columns x_1..x_8:
  // entry k means output symbol y_k (1-based).
  localparam table_t OUT_PRINTED = '{
     1, 4, 6, 7, 2, 5, 3, 8,   // s_1
     6, 3, 4, 8, 5, 7, 2, 1,
     4, 8, 3, 6, 2, 5, 1, 7,
     1, 3, 8, 4, 5, 7, 6, 2,
     1, 7, 6, 3, 2, 5, 4, 8,
     3, 1, 6, 5, 4, 8, 7, 2,
     4, 7, 3, 1, 6, 2, 5, 8,
     4, 1, 8, 5, 2, 6, 3, 7,
     5, 7, 4, 8, 2, 3, 6, 1,
     4, 1, 7, 8, 5, 2, 3, 6,
     6, 3, 2, 1, 5, 4, 8, 7,
     6, 2, 7, 1, 3, 8, 5, 4    // s_12
  };

  // State table f_s, one row of 8 per state s_1..s_12, columns x_1..x_8:
  // entry k means next state s_k (1-based).
  localparam table_t NEXT_PRINTED = '{
      1, 12,  5, 11,  4, 11,  5,  4,   // s_1
      7, 11,  4,  4,  8, 12,  8,  3,
     10, 12,  1,  7, 10,  5,  9,  6,
      6,  7,  1,  5,  8,  8, 10,  7,
     11, 12,  5,  3,  4,  7, 10,  4,
      9,  7,  3,  9,  3,  6,  3,  6,
      8,  8,  8,  9, 11,  7,  7,  1,
     10,  2, 11,  5,  6,  1,  4, 12,
      7,  2,  8,  6,  2, 12, 12, 10,
      9, 10, 12, 11, 12,  7,  2,  9,
      9, 11, 12,  1, 10,  9,  1, 11,
      4, 12,  9,  4,  5,  6,  5,  5    // s_12
  };

  function automatic table_t to_codes(table_t t);
    table_t c;
    for (int i = 0; i < int'(M * N); i++)
      c[i] = t[i] - 1;
    return c;
  endfunction

  localparam table_t DIR_OUT  = to_codes(OUT_PRINTED);   // f_o, 0-based codes
  localparam table_t DIR_NEXT = to_codes(NEXT_PRINTED);  // f_s, 0-based codes

endpackage

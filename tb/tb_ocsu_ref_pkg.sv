// tb_ocsu_ref_pkg -- reference data and models for the testbenches.
//
// Holds the four tables of the 8-symbol, 12-state example machine in their
// 1-based form (x_1, s_1 = 1): the direct output and state tables, and the inverse
// output and state tables written out independently (not computed from the
// direct ones, so that the design's inversion is checked against them). The
// functions run the machine the plain software way, one symbol after another:
// out = OUT[state][sym]; state = NEXT[state][sym].
package tb_ocsu_ref_pkg;

  localparam int N = 8;
  localparam int M = 12;

  typedef int tbl_t [12][8];

  localparam tbl_t T_OUT = '{
    '{1,4,6,7,2,5,3,8}, '{6,3,4,8,5,7,2,1}, '{4,8,3,6,2,5,1,7}, '{1,3,8,4,5,7,6,2},
    '{1,7,6,3,2,5,4,8}, '{3,1,6,5,4,8,7,2}, '{4,7,3,1,6,2,5,8}, '{4,1,8,5,2,6,3,7},
    '{5,7,4,8,2,3,6,1}, '{4,1,7,8,5,2,3,6}, '{6,3,2,1,5,4,8,7}, '{6,2,7,1,3,8,5,4}};

  localparam tbl_t T_NEXT = '{
    '{1,12,5,11,4,11,5,4},  '{7,11,4,4,8,12,8,3},   '{10,12,1,7,10,5,9,6},  '{6,7,1,5,8,8,10,7},
    '{11,12,5,3,4,7,10,4},  '{9,7,3,9,3,6,3,6},     '{8,8,8,9,11,7,7,1},    '{10,2,11,5,6,1,4,12},
    '{7,2,8,6,2,12,12,10},  '{9,10,12,11,12,7,2,9}, '{9,11,12,1,10,9,1,11}, '{4,12,9,4,5,6,5,5}};

  localparam tbl_t T_INV_OUT = '{
    '{1,5,7,2,6,3,4,8}, '{8,7,2,3,5,1,6,4}, '{7,5,3,1,6,4,8,2}, '{1,8,2,4,5,7,6,3},
    '{1,5,4,7,6,3,2,8}, '{2,8,1,5,4,3,7,6}, '{4,6,3,1,7,5,2,8}, '{2,5,7,1,4,6,8,3},
    '{8,5,6,3,1,7,2,4}, '{2,6,7,1,5,8,3,4}, '{4,3,2,6,5,1,8,7}, '{4,2,5,8,7,1,3,6}};

  localparam tbl_t T_INV_NEXT = '{
    '{1,4,5,12,11,5,11,4},   '{3,8,11,4,8,7,12,4},    '{9,10,1,10,5,7,6,12},  '{6,7,7,5,8,10,8,1},
    '{11,4,3,10,7,5,12,4},   '{7,6,9,3,9,3,3,6},      '{9,7,8,8,7,11,8,1},    '{2,6,4,10,5,1,12,11},
    '{10,2,12,8,7,12,2,6},   '{10,7,2,9,12,9,12,11},  '{1,12,11,9,10,9,11,1}, '{4,12,5,5,5,4,9,6}};

  // One step of the machine, 0-based codes; inv selects the inverse tables.
  function automatic void step(input bit inv, input int s, input int sym,
                               output int o, output int s_next);
    int r;
    r = (s < M) ? s : 0;
    if (inv) begin
      o      = T_INV_OUT[r][sym] - 1;
      s_next = T_INV_NEXT[r][sym] - 1;
    end else begin
      o      = T_OUT[r][sym] - 1;
      s_next = T_NEXT[r][sym] - 1;
    end
  endfunction

endpackage

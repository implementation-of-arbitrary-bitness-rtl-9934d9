// ocsu_invert.svh -- construction of the inverse machine from a direct one.
//
// Included inside a module body that defines the parameters N and M. Tables
// are flat, entry [s*N + x] for state s and symbol x. For every state row
// independently, the inverse output table puts at column v the input symbol
// that the direct output table maps to v, and the inverse state table puts at
// column v the direct next state found in that same cell. Each direct output
// row must be a permutation of 0..N-1; the inverse machine keeps the direct
// machine's initial state. The functions are evaluated at elaboration time,
// to set localparams.

typedef int unsigned inv_table_t [M*N];

// Column of the first cell of row st of the direct output table that holds v.
function automatic int unsigned inv_col(inv_table_t dir_out, int unsigned st, int unsigned v);
  int unsigned k;
  k = 0;
  for (int c = int'(N) - 1; c >= 0; c--)
    if (dir_out[st*N + c] == v) k = c;
  return k;
endfunction

function automatic inv_table_t invert_out(inv_table_t dir_out);
  inv_table_t t;
  for (int i = 0; i < int'(M); i++)
    for (int v = 0; v < int'(N); v++)
      t[i*N + v] = inv_col(dir_out, i, v);
  return t;
endfunction

function automatic inv_table_t invert_next(inv_table_t dir_out, inv_table_t dir_next);
  inv_table_t t;
  for (int i = 0; i < int'(M); i++)
    for (int v = 0; v < int'(N); v++)
      t[i*N + v] = dir_next[i*N + inv_col(dir_out, i, v)];
  return t;
endfunction

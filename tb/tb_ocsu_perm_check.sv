// tb_ocsu_perm_check -- exhaustive permutation check of one machine size.
//
// Builds a machine with N symbols and M states at elaboration time by the
// usual random construction: each output-table row is filled by drawing
// random symbols and keeping those not yet in the row; the state table is
// filled with random states and drawn again until every state is reachable
// from the initial state 0. A fixed linear congruential generator seeded with
// SEED stands in for the random source, so the machine is reproducible.
//
// A direct and an inverse cascade of R units are built on it. Every one of the
// N**R words is applied: the direct output is compared with the machine run in
// software, all outputs must be distinct (a bijection), and the inverse
// cascade must return the word. Results are counted on the checks and
// failures outputs; done rises when the sweep is over.
module tb_ocsu_perm_check #(
  parameter int N    = 4,
  parameter int M    = 4,
  parameter int R    = 4,
  parameter int SEED = 1,
  localparam int D   = $clog2(N),
  localparam int W   = $clog2(M)
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  typedef int unsigned tbl_t [M*N];

  function automatic int unsigned lcg(int unsigned v);
    return v * 32'd1103515245 + 32'd12345;
  endfunction

  function automatic tbl_t gen_out(int unsigned seed);
    tbl_t t;
    int unsigned v, c, sym;
    bit used [N];
    v = seed;
    for (int s = 0; s < M; s++) begin
      for (int k = 0; k < N; k++) used[k] = 1'b0;
      c = 0;
      while (c < N) begin
        v   = lcg(v);
        sym = (v >> 16) % N;
        if (!used[sym]) begin
          used[sym] = 1'b1;
          t[s*N + c] = sym;
          c++;
        end
      end
    end
    return t;
  endfunction

  function automatic bit connected(tbl_t nxt);
    bit reach [M];
    bit grew;
    for (int s = 0; s < M; s++) reach[s] = (s == 0);
    grew = 1'b1;
    while (grew) begin
      grew = 1'b0;
      for (int s = 0; s < M; s++)
        if (reach[s])
          for (int k = 0; k < N; k++)
            if (!reach[nxt[s*N + k]]) begin
              reach[nxt[s*N + k]] = 1'b1;
              grew = 1'b1;
            end
    end
    for (int s = 0; s < M; s++)
      if (!reach[s]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic tbl_t gen_next(int unsigned seed);
    tbl_t t;
    int unsigned v;
    v = seed ^ 32'h5a5a_0f0f;
    do begin
      for (int i = 0; i < M*N; i++) begin
        v    = lcg(v);
        t[i] = (v >> 16) % M;
      end
    end while (!connected(t));
    return t;
  endfunction

  localparam tbl_t OUT_T  = gen_out(SEED);
  localparam tbl_t NEXT_T = gen_next(SEED);

  logic [R-1:0][D-1:0] x, y, xr;
  logic [W-1:0]        sd, si;

  ocsu_cascade #(.N(N), .M(M), .R(R), .OUT_TBL(OUT_T), .NEXT_TBL(NEXT_T))
    u_dir (.x(x), .s_in('0), .y(y), .s_out(sd));
  ocsu_inv_cascade #(.N(N), .M(M), .R(R), .DIR_OUT(OUT_T), .DIR_NEXT(NEXT_T))
    u_inv (.y(y), .s_in('0), .x(xr), .s_out(si));

  initial begin
    bit seen [N**R];
    int st, idx;
    done = 1'b0; checks = 0; failures = 0;
    for (int w = 0; w < N**R; w++) seen[w] = 1'b0;
    for (int w = 0; w < N**R; w++) begin
      x = (R*D)'(w);
      @(posedge clk);
      st = 0;
      for (int k = 0; k < R; k++) begin
        idx = st * N + int'(x[k]);
        checks++;
        if (int'(y[k]) != int'(OUT_T[idx])) begin
          failures++;
          $display("FAIL N=%0d M=%0d word %0d symbol %0d", N, M, w, k);
        end
        st = int'(NEXT_T[idx]);
      end
      checks += 3;
      if (seen[int'(y)]) begin
        failures++;
        $display("FAIL N=%0d M=%0d: output %0d produced twice", N, M, y);
      end
      seen[int'(y)] = 1'b1;
      if (xr != x) begin
        failures++;
        $display("FAIL N=%0d M=%0d: inverse of word %0d gave %0d", N, M, w, xr);
      end
      if (si != sd || int'(sd) != st) begin
        failures++;
        $display("FAIL N=%0d M=%0d: final states %0d %0d expected %0d", N, M, sd, si, st);
      end
    end
    done = 1'b1;
  end

endmodule

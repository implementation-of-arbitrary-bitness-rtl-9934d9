// tb_ocsu_equiv -- renumbering the states does not change the permutation.
//
// From the built-in machine A a second machine A1 is formed with a state
// relabelling p (here p(s) = (5*s + 3) mod 12, a bijection on 12 states):
//   out1(x, s)  = out(x, p(s))
//   next1(x, s) = p^-1(next(x, p(s)))
//   initial1    = p^-1(initial)
// Cascades of both machines are driven with the same random words and must
// give the same outputs, and A1's final state must be p^-1 of A's.
module tb_ocsu_equiv;
  import ocsu_pkg::*;

  localparam int unsigned RR = 8;

  typedef int unsigned tbl_t [M*N];

  function automatic int unsigned p(int unsigned s);
    return (5 * s + 3) % M;
  endfunction

  function automatic int unsigned p_inv(int unsigned s);
    int unsigned r;
    r = 0;
    for (int unsigned k = 0; k < M; k++)
      if (p(k) == s) r = k;
    return r;
  endfunction

  function automatic tbl_t relabel_out(tbl_t o);
    tbl_t t;
    for (int unsigned s = 0; s < M; s++)
      for (int unsigned x = 0; x < N; x++)
        t[s*N + x] = o[p(s)*N + x];
    return t;
  endfunction

  function automatic tbl_t relabel_next(tbl_t n);
    tbl_t t;
    for (int unsigned s = 0; s < M; s++)
      for (int unsigned x = 0; x < N; x++)
        t[s*N + x] = p_inv(n[p(s)*N + x]);
    return t;
  endfunction

  localparam tbl_t OUT1  = relabel_out(DIR_OUT);
  localparam tbl_t NEXT1 = relabel_next(DIR_NEXT);

  logic               clk = 1'b0;
  logic [RR-1:0][2:0] x, y, y1;
  logic [3:0]         sa, sb;
  int checks = 0, failures = 0, differ = 0;

  always #5 clk = ~clk;

  ocsu_cascade #(.R(RR)) u_a (.x(x), .s_in(4'(S0)), .y(y), .s_out(sa));
  ocsu_cascade #(.R(RR), .OUT_TBL(OUT1), .NEXT_TBL(NEXT1))
    u_b (.x(x), .s_in(4'(p_inv(S0))), .y(y1), .s_out(sb));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < int'(RR); k++) x[k] = 3'($urandom_range(7));
      @(posedge clk);
      checks += 2;
      if (y1 != y) begin
        failures++;
        $display("FAIL word %h: A gives %h, renumbered A1 gives %h", x, y, y1);
      end
      if (32'(sb) != p_inv(32'(sa))) begin
        failures++;
        $display("FAIL final states %0d and %0d do not correspond", sa, sb);
      end
    end
    // the relabelled tables really are different tables
    for (int i = 0; i < int'(M*N); i++) if (OUT1[i] != DIR_OUT[i]) differ++;
    checks++;
    if (differ == 0) begin
      failures++;
      $display("FAIL relabelling left the tables unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ocsu_inv_cascade -- check of the inverse cascade.
// A 1-unit inverse cascade is compared exhaustively with the reference inverse
// output and state tables (the design derives them from the direct tables).
// An 8-unit inverse cascade is then fed the output of a direct cascade for
// random words and initial states and must give the original word back, and
// its outputs are compared with the inverse machine run symbol by symbol.
module tb_ocsu_inv_cascade;
  import tb_ocsu_ref_pkg::*;

  localparam int R = 8;

  logic              clk = 1'b0;
  logic [0:0][2:0]   y1, x1;
  logic [3:0]        s1_in, s1_out;
  logic [R-1:0][2:0] x, y, xr;
  logic [3:0]        s_in, sd_out, si_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ocsu_inv_cascade #(.R(1)) dut1 (.y(y1), .s_in(s1_in), .x(x1), .s_out(s1_out));
  ocsu_cascade     ref_dir (.x(x), .s_in(s_in), .y(y), .s_out(sd_out));
  ocsu_inv_cascade dut (.y(y), .s_in(s_in), .x(xr), .s_out(si_out));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, o, sn;
    for (int si = 0; si < M; si++)
      for (int v = 0; v < N; v++) begin
        s1_in = 4'(si); y1 = 3'(v);
        @(posedge clk);
        checks += 2;
        if (int'(x1) != T_INV_OUT[si][v] - 1) begin
          failures++;
          $display("FAIL inverse output (s_%0d, y_%0d) = x_%0d, expected x_%0d",
                   si + 1, v + 1, x1 + 1, T_INV_OUT[si][v]);
        end
        if (int'(s1_out) != T_INV_NEXT[si][v] - 1) begin
          failures++;
          $display("FAIL inverse state (s_%0d, y_%0d) = s_%0d, expected s_%0d",
                   si + 1, v + 1, s1_out + 1, T_INV_NEXT[si][v]);
        end
      end
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < R; k++) x[k] = 3'($urandom_range(7));
      s_in = 4'($urandom_range(M - 1));
      @(posedge clk);
      checks += 2;
      if (xr != x) begin
        failures++;
        $display("FAIL round trip: x=%h y=%h back=%h", x, y, xr);
      end
      if (si_out != sd_out) begin
        failures++;
        $display("FAIL final states differ: direct %0d inverse %0d", sd_out, si_out);
      end
      st = int'(s_in);
      for (int k = 0; k < R; k++) begin
        step(1'b1, st, int'(y[k]), o, sn);
        checks++;
        if (int'(xr[k]) != o) begin
          failures++;
          $display("FAIL word %0d symbol %0d: x=%0d expected %0d", t, k, xr[k], o);
        end
        st = sn;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ocsu_cascade -- check of the direct cascade against a software model.
// An 8-unit cascade (the default size) gets random words and random initial
// states; every output symbol and the final state are compared with the
// machine run symbol by symbol. A 2-unit cascade is then driven with all 64
// words from initial state 0 to check that the map is a bijection. Two
// 4-unit cascades joined through s_out -> s_in must equal the 8-unit one.
module tb_ocsu_cascade;
  import tb_ocsu_ref_pkg::*;

  localparam int R = 8;

  logic             clk = 1'b0;
  logic [R-1:0][2:0] x, y;
  logic [3:0]        s_in, s_out;
  logic [1:0][2:0]   x2, y2;
  logic [3:0]        s2_out;
  logic [3:0]        s_mid, s_c_out;
  logic [R-1:0][2:0] y_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ocsu_cascade dut (.x(x), .s_in(s_in), .y(y), .s_out(s_out));
  ocsu_cascade #(.R(2)) dut2 (.x(x2), .s_in(4'd0), .y(y2), .s_out(s2_out));
  ocsu_cascade #(.R(4)) dut_lo (.x(x[3:0]), .s_in(s_in),  .y(y_c[3:0]), .s_out(s_mid));
  ocsu_cascade #(.R(4)) dut_hi (.x(x[7:4]), .s_in(s_mid), .y(y_c[7:4]), .s_out(s_c_out));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, o, sn;
    logic [63:0] seen;
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < R; k++) x[k] = 3'($urandom_range(7));
      s_in = 4'($urandom_range(M - 1));
      x2   = 6'(t);
      @(posedge clk);
      st = int'(s_in);
      for (int k = 0; k < R; k++) begin
        step(1'b0, st, int'(x[k]), o, sn);
        checks++;
        if (int'(y[k]) != o) begin
          failures++;
          $display("FAIL word %0d symbol %0d: y=%0d expected %0d", t, k, y[k], o);
        end
        st = sn;
      end
      checks++;
      if (y_c != y || s_c_out != s_out) begin
        failures++;
        $display("FAIL word %0d: chained cascades give %h, single cascade %h", t, y_c, y);
      end
      checks++;
      if (int'(s_out) != st) begin
        failures++;
        $display("FAIL word %0d: s_out=%0d expected %0d", t, s_out, st);
      end
    end
    seen = '0;
    for (int w = 0; w < 64; w++) begin
      x2 = 6'(w);
      @(posedge clk);
      seen[y2] = 1'b1;
    end
    checks++;
    if (seen != '1) begin
      failures++;
      $display("FAIL 2-unit cascade is not a bijection: %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ocsu_su -- exhaustive check of one structural unit.
// For every (state code, symbol) pair compares both outputs of the unit with
// the reference output and state tables, and checks that for each side-input
// value the primary outputs form a permutation of the alphabet (the condition
// for the cascade to be a bijection).
module tb_ocsu_su;
  import tb_ocsu_ref_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] x;
  logic [3:0] s;
  logic [2:0] y;
  logic [3:0] s_next;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ocsu_su dut (.x(x), .s(s), .y(y), .s_next(s_next));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o, sn;
    logic [7:0] seen;
    for (int si = 0; si < 16; si++) begin
      seen = '0;
      for (int xi = 0; xi < 8; xi++) begin
        s = 4'(si); x = 3'(xi);
        @(posedge clk);
        step(1'b0, si, xi, o, sn);
        seen[y] = 1'b1;
        checks += 2;
        if (int'(y) != o) begin
          failures++;
          $display("FAIL y(s=%0d, x=%0d) = %0d, expected %0d", si, xi, y, o);
        end
        if (int'(s_next) != sn) begin
          failures++;
          $display("FAIL s_next(s=%0d, x=%0d) = %0d, expected %0d", si, xi, s_next, sn);
        end
      end
      checks++;
      if (seen != 8'hFF) begin
        failures++;
        $display("FAIL outputs of state %0d are not a permutation (%b)", si, seen);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ocsu_fo -- exhaustive check of the output function f_o.
// Applies every (state code, symbol) pair, including the four unused state
// codes 12..15 (read as state 0), and compares y with the reference output table.
module tb_ocsu_fo;
  import tb_ocsu_ref_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] x;
  logic [3:0] s;
  logic [2:0] y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ocsu_fo dut (.x(x), .s(s), .y(y));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o, sn;
    for (int si = 0; si < 16; si++)
      for (int xi = 0; xi < 8; xi++) begin
        s = 4'(si); x = 3'(xi);
        @(posedge clk);
        step(1'b0, si, xi, o, sn);
        checks++;
        if (int'(y) != o) begin
          failures++;
          $display("FAIL f_o(s=%0d, x=%0d) = %0d, expected %0d", si, xi, y, o);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

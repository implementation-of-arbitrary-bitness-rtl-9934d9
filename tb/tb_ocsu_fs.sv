// tb_ocsu_fs -- exhaustive check of the state function f_s.
// Applies every (state code, symbol) pair, including the four unused state
// codes 12..15 (read as state 0), and compares the next state with the reference state table.
module tb_ocsu_fs;
  import tb_ocsu_ref_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] x;
  logic [3:0] s;
  logic [3:0] sn_dut;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ocsu_fs dut (.x(x), .s(s), .s_next(sn_dut));

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
        if (int'(sn_dut) != sn) begin
          failures++;
          $display("FAIL f_s(s=%0d, x=%0d) = %0d, expected %0d", si, xi, sn_dut, sn);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

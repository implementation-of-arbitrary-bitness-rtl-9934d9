// tb_ocsu_byte -- 8-bit permutations built from small machines.
//
// Two byte-wide configurations, each checked over all 256 words by
// tb_ocsu_perm_check: four cells of a 4-symbol, 4-state machine (d = w = 2,
// two LUTs per cell), and two cells of a 16-symbol, 4-state machine (d = 4,
// w = 2, six LUTs per cell). A further 16-bit case, four cells of a 16-symbol
// 12-state machine, is swept over all 65536 words.
module tb_ocsu_byte;
  logic clk = 1'b0;
  logic done_a, done_b, done_c;
  int   ca, fa, cb, fb, cc, fc;

  always #5 clk = ~clk;

  tb_ocsu_perm_check #(.N(4),  .M(4),  .R(4), .SEED(11)) u_a (.clk(clk), .done(done_a), .checks(ca), .failures(fa));
  tb_ocsu_perm_check #(.N(16), .M(4),  .R(2), .SEED(23)) u_b (.clk(clk), .done(done_b), .checks(cb), .failures(fb));
  tb_ocsu_perm_check #(.N(16), .M(12), .R(4), .SEED(37)) u_c (.clk(clk), .done(done_c), .checks(cc), .failures(fc));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b && done_c);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc);
    $finish;
  end
endmodule

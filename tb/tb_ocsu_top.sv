// tb_ocsu_top -- end-to-end test of the permutation engine at its default size.
//
// For random 8-symbol words (24-bit permutation of the 12-state machine):
//   * the direct cascade output is compared with the machine run in software;
//   * that output is applied to the inverse cascade, which must return the
//     word, with both cascades ending in the same state;
//   * the same word is streamed through the sequential unit as a direct
//     message, and every result symbol must equal the cascade's symbol (the
//     cascade and the machine compute the same map);
//   * the result is streamed back as an inverse message and must return the
//     word.
// Idle cycles, message restarts from a non-initial state, and a reset in the
// middle of a message are mixed in. Each mechanism is counted, and one that
// never happened counts as a failure.
module tb_ocsu_top;
  import tb_ocsu_ref_pkg::*;

  localparam int R = 8;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [R-1:0][2:0] x_in, y_out, y_in, x_out;
  logic [3:0]        dir_state_out, inv_state_out, stream_state;
  logic              in_valid, in_first, inverse, out_valid;
  logic [2:0]        in_sym, out_sym;
  int checks = 0, failures = 0;
  int n_direct = 0, n_inverse = 0, n_stream_dir = 0, n_stream_inv = 0;
  int n_idle = 0, n_restart = 0, n_reset = 0;

  always #5 clk = ~clk;

  ocsu_top dut (
    .x_in(x_in), .y_out(y_out), .dir_state_out(dir_state_out),
    .y_in(y_in), .x_out(x_out), .inv_state_out(inv_state_out),
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .inverse(inverse), .in_sym(in_sym), .out_valid(out_valid),
    .out_sym(out_sym), .stream_state(stream_state)
  );

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Streams one R-symbol message; returns the result symbols.
  task automatic stream_msg(input bit inv, input logic [R-1:0][2:0] msg,
                            output logic [R-1:0][2:0] res);
    if (stream_state != 4'd0) n_restart++;
    for (int k = 0; k < R; k++) begin
      in_valid = 1'b1; in_first = (k == 0); inverse = inv; in_sym = msg[k];
      @(posedge clk);
      #1;
      in_valid = 1'b0; in_first = 1'b0; inverse = ~inv;
      check(out_valid, "stream result not valid one clock after its symbol");
      res[k] = out_sym;
      if ($urandom_range(4) == 0) begin
        @(posedge clk);
        #1;
        n_idle++;
        check(!out_valid, "stream result valid on an idle cycle");
      end
    end
    if (inv) n_stream_inv++; else n_stream_dir++;
  endtask

  initial begin
    int st, o, sn;
    logic [R-1:0][2:0] res, back;
    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; inverse = 1'b0; in_sym = '0;
    x_in = '0; y_in = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      for (int k = 0; k < R; k++) x_in[k] = 3'($urandom_range(7));
      #1;
      // direct cascade against the software machine
      st = 0;
      for (int k = 0; k < R; k++) begin
        step(1'b0, st, int'(x_in[k]), o, sn);
        check(int'(y_out[k]) == o, $sformatf("direct word %0d symbol %0d", t, k));
        st = sn;
      end
      check(int'(dir_state_out) == st, "direct final state");
      n_direct++;
      // inverse cascade undoes it
      y_in = y_out;
      #1;
      check(x_out == x_in, $sformatf("inverse cascade word %0d", t));
      check(inv_state_out == dir_state_out, "inverse final state");
      n_inverse++;
      // the sequential machine gives the same map, both ways
      stream_msg(1'b0, x_in, res);
      check(res == y_out, $sformatf("stream direct word %0d: %h vs cascade %h", t, res, y_out));
      check(stream_state == dir_state_out, "stream final state");
      stream_msg(1'b1, res, back);
      check(back == x_in, $sformatf("stream inverse word %0d", t));
      // a reset in the middle of a message, once
      if (t == 200) begin
        in_valid = 1'b1; in_first = 1'b1; inverse = 1'b0; in_sym = 3'd5;
        @(posedge clk);
        #1;
        in_valid = 1'b0; in_first = 1'b0;
        rst_n = 1'b0;
        @(posedge clk);
        #1;
        rst_n = 1'b1;
        check(stream_state == 4'd0 && !out_valid, "reset returns the machine to S0");
        n_reset++;
      end
    end
    $display("mechanisms: direct=%0d inverse=%0d stream_direct=%0d stream_inverse=%0d idle=%0d restart=%0d reset=%0d",
             n_direct, n_inverse, n_stream_dir, n_stream_inv, n_idle, n_restart, n_reset);
    check(n_direct > 0,     "direct cascade never exercised");
    check(n_inverse > 0,    "inverse cascade never exercised");
    check(n_stream_dir > 0, "stream direct never exercised");
    check(n_stream_inv > 0, "stream inverse never exercised");
    check(n_idle > 0,       "idle cycle never exercised");
    check(n_restart > 0,    "restart from a non-initial state never exercised");
    check(n_reset > 0,      "reset never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

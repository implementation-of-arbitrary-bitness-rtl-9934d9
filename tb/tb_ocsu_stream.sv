// tb_ocsu_stream -- check of the sequential machine.
// Sends messages of random length (1..24 symbols) in random direction, with
// random idle cycles between symbols, and compares each result symbol and the
// state register with the machine run in software. The result must appear
// exactly one clock after its input symbol (latency 1, one symbol a clock).
// Every direct message is then sent back in the inverse direction and must
// return the original symbols.
module tb_ocsu_stream;
  import tb_ocsu_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid, in_first, inverse;
  logic [2:0] in_sym;
  logic       out_valid;
  logic [2:0] out_sym;
  logic [3:0] state;
  int checks = 0, failures = 0;
  int model_state = 0;
  bit model_inv   = 1'b0;
  int idle_cycles = 0;

  always #5 clk = ~clk;

  ocsu_stream dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .inverse(inverse), .in_sym(in_sym), .out_valid(out_valid),
    .out_sym(out_sym), .state(state)
  );

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Presents one symbol for one clock and checks the result right after the edge.
  task automatic send(input bit first, input bit inv, input int sym, output int result);
    int o, sn;
    in_valid = 1'b1; in_first = first; inverse = inv; in_sym = 3'(sym);
    if (first) begin
      model_state = 0;
      model_inv   = inv;
    end
    step(model_inv, model_state, sym, o, sn);
    model_state = sn;
    @(posedge clk);
    #1;
    in_valid = 1'b0; in_first = 1'b0; inverse = $urandom_range(1);
    in_sym = 3'($urandom_range(7));
    checks += 3;
    if (!out_valid) begin
      failures++;
      $display("FAIL out_valid missing one clock after the input");
    end
    if (int'(out_sym) != o) begin
      failures++;
      $display("FAIL out_sym=%0d expected %0d", out_sym, o);
    end
    if (int'(state) != model_state) begin
      failures++;
      $display("FAIL state=%0d expected %0d", state, model_state);
    end
    result = int'(out_sym);
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(posedge clk);
      #1;
      idle_cycles++;
      checks += 2;
      if (out_valid) begin
        failures++;
        $display("FAIL out_valid without an input symbol");
      end
      if (int'(state) != model_state) begin
        failures++;
        $display("FAIL state changed while idle");
      end
    end
  endtask

  initial begin
    int len, r;
    int msg[$], enc[$];
    bit inv;
    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; inverse = 1'b0; in_sym = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    checks++;
    if (state != 4'd0 || out_valid) begin
      failures++;
      $display("FAIL reset state");
    end
    for (int m = 0; m < 300; m++) begin
      len = $urandom_range(24, 1);
      inv = 1'(m % 3 == 2);
      msg.delete(); enc.delete();
      for (int k = 0; k < len; k++) begin
        msg.push_back($urandom_range(7));
        send(k == 0, inv, msg[k], r);
        enc.push_back(r);
        if ($urandom_range(3) == 0) idle($urandom_range(2, 1));
      end
      if (!inv) begin
        // send the result back through the inverse machine
        for (int k = 0; k < len; k++) begin
          send(k == 0, 1'b1, enc[k], r);
          checks++;
          if (r != msg[k]) begin
            failures++;
            $display("FAIL round trip message %0d symbol %0d: %0d expected %0d", m, k, r, msg[k]);
          end
        end
      end
    end
    checks++;
    if (idle_cycles == 0) begin
      failures++;
      $display("FAIL no idle cycle was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

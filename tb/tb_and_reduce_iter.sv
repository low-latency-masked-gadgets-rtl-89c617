// tb_and_reduce_iter: self-checking test of the iterative masked AND reduction.
//
// Streams random bit vectors (length 1..24, every third one all ones so the
// result is also 1) as fresh random sharings into instances with D = 2
// (default) and D = 3, with sel = 1 on the first bit. After every bit the
// XOR of the accumulator shares must equal the AND of the bits so far, one
// clock edge after the bit was applied. It then holds sel = 1 (pipeline use)
// and checks that the output is just the registered input bit. Counts both
// uses and results of both values.
module tb_and_reduce_iter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       en, sel;
  logic [1:0] x2, acc2;
  logic [4:0] r2;
  logic [2:0] x3, acc3;
  logic [14:0] r3;

  and_reduce_iter          d2 (.clk, .en_i(en), .sel_i(sel), .x_i(x2), .rnd_i(r2), .acc_o(acc2));
  and_reduce_iter #(.D(3)) d3 (.clk, .en_i(en), .sel_i(sel), .x_i(x3), .rnd_i(r3), .acc_o(acc3));

  initial begin
    int   n, n_one = 0, n_zero = 0, n_pipe = 0;
    logic b, acc_ref;
    logic [1:0] m3;
    en = 1'b1;
    for (int v = 0; v < 60; v++) begin
      n = $urandom_range(1, 24);
      acc_ref = 1'b1;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        b = (v % 3 == 0) ? 1'b1 : ($urandom_range(99) < 85);
        acc_ref &= b;
        sel = (i == 0);
        x2[1] = 1'($urandom); x2[0] = b ^ x2[1];
        m3 = 2'($urandom); x3 = {m3, b ^ m3[0] ^ m3[1]};
        r2 = 5'($urandom); r3 = 15'($urandom);
        @(posedge clk);
        #1;
        check((acc2[0] ^ acc2[1]) == acc_ref, $sformatf("D=2 vector %0d bit %0d", v, i));
        check((acc3[0] ^ acc3[1] ^ acc3[2]) == acc_ref, $sformatf("D=3 vector %0d bit %0d", v, i));
      end
      if (acc_ref) n_one++; else n_zero++;
    end
    // pipeline use: sel held at 1
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      b = 1'($urandom);
      sel = 1'b1;
      x2[1] = 1'($urandom); x2[0] = b ^ x2[1];
      m3 = 2'($urandom); x3 = {m3, b ^ m3[0] ^ m3[1]};
      r2 = 5'($urandom); r3 = 15'($urandom);
      @(posedge clk);
      #1;
      check((acc2[0] ^ acc2[1]) == b, "pipeline D=2");
      check((acc3[0] ^ acc3[1] ^ acc3[2]) == b, "pipeline D=3");
      n_pipe++;
    end
    check(n_one > 0 && n_zero > 0 && n_pipe > 0, "both results and pipeline use seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_hpc4_and: self-checking test of the HPC4 gadget for 2, 3 and 4 shares.
//
// Each cycle drives random sharings of random x and y and fresh randomness
// into three gadget instances (D = 2, W = 1 as default; D = 3, W = 4;
// D = 4, W = 2) and checks, one clock edge later, that the XOR of the output
// shares equals x & y (single-cycle latency). It checks that holding en low
// keeps the outputs, and that with x and y fixed the output share 0 still
// changes with the randomness (the output sharing is refreshed).
module tb_hpc4_and;

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
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instances --------------------------------------------------------
  logic [1:0][0:0] x2, y2, z2, q2;
  logic [4:0]      r2;
  logic [1:0]      en2;
  hpc4_and dut2 (.clk, .en(en2), .x(x2), .y(y2), .r(r2), .z(z2), .xy_q(q2));

  logic [2:0][3:0] x3, y3, z3, q3;
  logic [59:0]     r3;
  logic [2:0]      en3;
  hpc4_and #(.D(3), .W(4)) dut3 (.clk, .en(en3), .x(x3), .y(y3), .r(r3), .z(z3), .xy_q(q3));

  logic [3:0][1:0] x4, y4, z4, q4;
  logic [59:0]     r4;
  logic [3:0]      en4;
  hpc4_and #(.D(4), .W(2)) dut4 (.clk, .en(en4), .x(x4), .y(y4), .r(r4), .z(z4), .xy_q(q4));

  function automatic logic [3:0] fold3(input logic [2:0][3:0] v);
    return v[0] ^ v[1] ^ v[2];
  endfunction
  function automatic logic [1:0] fold4(input logic [3:0][1:0] v);
    return v[0] ^ v[1] ^ v[2] ^ v[3];
  endfunction

  initial begin
    logic       e2;
    logic [3:0] e3;
    logic [1:0] e4, hold4;
    int         n0, n1;

    en2 = '1; en3 = '1; en4 = '1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      x2 = 2'($urandom); y2 = 2'($urandom); r2 = 5'($urandom);
      x3 = 12'($urandom); y3 = 12'($urandom); r3 = {$urandom, $urandom};
      x4 = 8'($urandom); y4 = 8'($urandom); r4 = {$urandom, $urandom};
      e2 = (x2[0] ^ x2[1]) & (y2[0] ^ y2[1]);
      e3 = fold3(x3) & fold3(y3);
      e4 = fold4(x4) & fold4(y4);
      @(posedge clk);
      #1;
      check((z2[0] ^ z2[1]) == e2, $sformatf("D=2 product, iteration %0d", it));
      check(fold3(z3) == e3, $sformatf("D=3 product, iteration %0d", it));
      check(fold4(z4) == e4, $sformatf("D=4 product, iteration %0d", it));
    end

    // enable low holds every share
    @(negedge clk);
    hold4 = fold4(z4);
    en4 = '0;
    x4 = ~x4; y4 = ~y4; r4 = ~r4;
    repeat (3) @(posedge clk);
    #1;
    check(fold4(z4) == hold4, "D=4 hold with en low");
    en4 = '1;

    // with x and y fixed, output share 0 is randomised by r'' ^ r'''
    n0 = 0; n1 = 0;
    for (int it = 0; it < 64; it++) begin
      @(negedge clk);
      x2 = 2'b01; y2 = 2'b11; r2 = 5'($urandom);
      @(posedge clk);
      #1;
      if (z2[0]) n1++; else n0++;
      check((z2[0] ^ z2[1]) == 1'b0, "D=2 fixed-input product");
    end
    check(n0 > 0 && n1 > 0, "output share 0 depends on the randomness");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_hpc4_and_shared: self-checking test of the sharing-capable HPC4 gadget.
//
// Drives a D = 3, W = 8 instance with random inputs and a random mode per
// cycle. One clock edge later it checks: in masked mode the XOR of the
// output shares is x & y; in unprotected mode output share 0 is x_0 & y_0
// and every other output share is zero. It also counts both modes and the
// switches between them, and checks that a held (en low) gadget keeps its
// mode and outputs.
module tb_hpc4_and_shared;

  localparam int unsigned D = 3, W = 8;

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

  logic [D-1:0][W-1:0]      x, y, z;
  logic [5*D*(D-1)/2*W-1:0] r;
  logic [D-1:0]             en;
  logic                     unprot;

  hpc4_and_shared #(.D(D), .W(W)) dut (.clk, .en, .unprot, .x, .y, .r, .z);

  function automatic logic [W-1:0] fold(input logic [D-1:0][W-1:0] v);
    logic [W-1:0] o = '0;
    for (int s = 0; s < D; s++) o ^= v[s];
    return o;
  endfunction

  initial begin
    logic [W-1:0]        e;
    logic [D-1:0][W-1:0] hold;
    logic                m, last_m;
    int                  n_mask = 0, n_unp = 0, n_switch = 0;

    en = '1;
    last_m = 1'b0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      x = {$urandom}; y = {$urandom};
      for (int i = 0; i < $bits(r) / 32 + 1; i++) r[32*i +: 32] = $urandom;
      m = 1'($urandom);
      unprot = m;
      @(posedge clk);
      #1;
      if (m) begin
        check(z[0] == (x[0] & y[0]), $sformatf("unprotected share 0, iteration %0d", it));
        for (int s = 1; s < D; s++) check(z[s] == '0, "unprotected other shares zero");
        n_unp++;
      end else begin
        check(fold(z) == (fold(x) & fold(y)), $sformatf("masked product, iteration %0d", it));
        n_mask++;
      end
      if (m != last_m) n_switch++;
      last_m = m;
    end

    // hold
    @(negedge clk);
    hold = z;
    en = '0;
    unprot = ~last_m;
    x = ~x;
    repeat (2) @(posedge clk);
    #1;
    check(z == hold, "held gadget keeps outputs and mode");

    check(n_mask > 0 && n_unp > 0 && n_switch > 0, "both modes and switches exercised");
    $display("masked=%0d unprotected=%0d switches=%0d", n_mask, n_unp, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

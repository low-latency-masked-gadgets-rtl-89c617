// tb_ascon_perm_unr: self-checking test of the unrolled unprotected permutation.
//
// Instances with U = 3 (default), 1, 2 and 6 rounds per cycle get a random
// state and a random valid first round index; one clock edge later each
// registered result must equal U reference rounds (ascon_ref_pkg). Feeding
// the U = 3 instance back on itself twice must give p^b (6 rounds in 2
// cycles). A held instance (en low) must keep its value.
module tb_ascon_perm_unr;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;

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

  logic       en3, en1, en2, en6;
  logic [3:0] rc3, rc1, rc2, rc6;
  state_t     in3, in1, in2, in6, q3, q1, q2, q6;

  ascon_perm_unr          d3 (.clk, .en(en3), .rc_idx(rc3), .s_in(in3), .s_q(q3));
  ascon_perm_unr #(.U(1)) d1 (.clk, .en(en1), .rc_idx(rc1), .s_in(in1), .s_q(q1));
  ascon_perm_unr #(.U(2)) d2 (.clk, .en(en2), .rc_idx(rc2), .s_in(in2), .s_q(q2));
  ascon_perm_unr #(.U(6)) d6 (.clk, .en(en6), .rc_idx(rc6), .s_in(in6), .s_q(q6));

  function automatic state_t rand_state();
    state_t v;
    for (int k = 0; k < 5; k++) v[k] = {$urandom, $urandom};
    return v;
  endfunction

  function automatic state_t ref_rounds(input state_t v, input int first, input int n);
    st_t r;
    state_t o;
    for (int k = 0; k < 5; k++) r[k] = v[k];
    for (int i = 0; i < n; i++) round_ref(r, first + i);
    for (int k = 0; k < 5; k++) o[k] = r[k];
    return o;
  endfunction

  initial begin
    int     i3, i1, i2, i6;
    state_t e3, e1, e2, e6, h;
    en3 = 1; en1 = 1; en2 = 1; en6 = 1;
    for (int it = 0; it < 50; it++) begin
      @(negedge clk);
      in3 = rand_state(); in1 = rand_state(); in2 = rand_state(); in6 = rand_state();
      i3 = $urandom_range(9); i1 = $urandom_range(11); i2 = $urandom_range(10);
      i6 = $urandom_range(6);
      rc3 = 4'(i3); rc1 = 4'(i1); rc2 = 4'(i2); rc6 = 4'(i6);
      e3 = ref_rounds(in3, i3, 3); e1 = ref_rounds(in1, i1, 1);
      e2 = ref_rounds(in2, i2, 2); e6 = ref_rounds(in6, i6, 6);
      @(posedge clk);
      #1;
      check(q3 == e3, "U=3 rounds");
      check(q1 == e1, "U=1 round");
      check(q2 == e2, "U=2 rounds");
      check(q6 == e6, "U=6 rounds");
    end
    // p^b in two cycles with U = 3
    for (int it = 0; it < 10; it++) begin
      @(negedge clk);
      in3 = rand_state(); rc3 = 4'd6;
      e3 = ref_rounds(in3, 6, 6);
      @(posedge clk);
      #1;
      in3 = q3; rc3 = 4'd9;
      @(posedge clk);
      #1;
      check(q3 == e3, "p^b in 2 cycles with U=3");
    end
    // hold
    @(negedge clk);
    h = q3; en3 = 0; in3 = rand_state();
    repeat (2) @(posedge clk);
    #1;
    check(q3 == h, "held permutation keeps its state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ascon_round_masked: self-checking test of the masked Ascon round.
//
// Single rounds: random states, split into random D = 2 sharings, with a
// random round index and fresh randomness; one clock edge later the XOR of
// the output shares must equal the reference round (ascon_ref_pkg). Full
// permutation: s_out fed back to s_in for 12 cycles must give p^a, i.e. one
// round per cycle. Unprotected mode: the state on share 0 and zero on share 1
// must give the reference round on share 0 alone, with share 1 staying zero.
module tb_ascon_round_masked;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;

  localparam int unsigned D  = 2;
  localparam int unsigned RB = 5*64*5*D*(D-1)/2;

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
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [D-1:0]   en;
  logic           unprot;
  logic [3:0]     rc_idx;
  state_t [D-1:0] s_in, s_out;
  logic [RB-1:0]  rnd;
  logic           loop;

  ascon_round_masked #(.D(D)) dut (.clk, .en, .unprot, .rc_idx, .s_in, .rnd, .s_out);

  always @(negedge clk)
    for (int i = 0; i < RB / 32; i++) rnd[32*i +: 32] = $urandom;

  function automatic state_t rand_state();
    state_t v;
    for (int k = 0; k < 5; k++) v[k] = {$urandom, $urandom};
    return v;
  endfunction

  function automatic state_t fold(input state_t [D-1:0] v);
    state_t o = '0;
    for (int s = 0; s < D; s++)
      for (int k = 0; k < 5; k++) o[k] ^= v[s][k];
    return o;
  endfunction

  function automatic state_t to_st(input st_t r);
    state_t o;
    for (int k = 0; k < 5; k++) o[k] = r[k];
    return o;
  endfunction

  initial begin
    state_t v, m;
    st_t    ref_s;
    int     idx;

    en = '1; unprot = 1'b0; loop = 1'b0;
    // single masked rounds
    for (int it = 0; it < 60; it++) begin
      @(negedge clk);
      v = rand_state(); m = rand_state();
      idx = $urandom_range(11);
      s_in[0] = v; s_in[1] = m;
      for (int k = 0; k < 5; k++) s_in[0][k] ^= m[k];
      rc_idx = 4'(idx);
      for (int k = 0; k < 5; k++) ref_s[k] = v[k];
      round_ref(ref_s, idx);
      @(posedge clk);
      #1;
      check(fold(s_out) == to_st(ref_s), $sformatf("masked round %0d", it));
    end

    // 12 rounds in 12 cycles
    for (int it = 0; it < 4; it++) begin
      @(negedge clk);
      v = rand_state(); m = rand_state();
      s_in[0] = v; s_in[1] = m;
      for (int k = 0; k < 5; k++) s_in[0][k] ^= m[k];
      for (int k = 0; k < 5; k++) ref_s[k] = v[k];
      perm(ref_s, 12);
      for (int r = 0; r < 12; r++) begin
        rc_idx = 4'(r);
        @(posedge clk);
        #1;
        s_in = s_out;
        @(negedge clk);
      end
      check(fold(s_out) == to_st(ref_s), $sformatf("p^a in 12 cycles, run %0d", it));
    end

    // unprotected rounds on share 0
    for (int it = 0; it < 30; it++) begin
      @(negedge clk);
      v = rand_state();
      idx = $urandom_range(11);
      s_in[0] = v; s_in[1] = '0; unprot = 1'b1;
      rc_idx = 4'(idx);
      for (int k = 0; k < 5; k++) ref_s[k] = v[k];
      round_ref(ref_s, idx);
      @(posedge clk);
      #1;
      check(s_out[0] == to_st(ref_s), $sformatf("unprotected round %0d on share 0", it));
      check(s_out[1] == '0, "unprotected round leaves share 1 zero");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

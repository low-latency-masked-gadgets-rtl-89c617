// tb_hpc4_ascon_top: end-to-end, full-size test of hpc4_ascon_top at its
// default parameters (D = 2 shares, unrolling U = 3).
//
// Drives the fully shared core (FS), then the partially shared core (PS),
// through a sequence of Ascon-128 operations that alternates uniform and
// leveled mode, encrypts and decrypts, and leaves gaps on the data port; the
// results are compared with the byte-level reference model ascon_ref_pkg.
// Then it runs the AND reduction on random bit vectors.
//
// Every mechanism the design is built around is counted, and a mechanism
// that never happened is a failure:
//   masked rounds (randomness requested), frozen randomness during leveled
//   p^b, clock-gated upper shares in FS, the unrolled unprotected
//   permutation in PS, uniform->leveled and leveled->uniform switches,
//   decryption, stalls at a block boundary, the tag held at zero until
//   valid, AND-reduction restart (sel = 1) and accumulation (sel = 0).
module tb_hpc4_ascon_top;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;

  localparam int unsigned D  = 2;
  localparam int unsigned U  = 3;
  localparam int unsigned RB = 5*64*5*D*(D-1)/2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // common drive, steered to one core by `core`
  logic                core;  // 0 = FS, 1 = PS
  logic                start, decrypt, din_valid;
  mode_e               mode;
  logic [D-1:0][127:0] key_sh;
  logic [127:0]        nonce;
  blk_t                din;
  logic [RB-1:0]       rnd_fs, rnd_ps;

  logic                fs_din_ready, fs_dout_valid, fs_tag_valid, fs_rnd_en, fs_busy, fs_stall;
  logic                ps_din_ready, ps_dout_valid, ps_tag_valid, ps_rnd_en, ps_busy, ps_stall;
  word_t               fs_dout, ps_dout;
  logic [D-1:0][127:0] fs_tag, ps_tag;

  logic                ar_en, ar_sel;
  logic [D-1:0]        ar_x, ar_acc;
  logic [5*D*(D-1)/2-1:0] ar_rnd;

  hpc4_ascon_top dut (
    .clk, .rst_n,
    .fs_start_i(start && !core), .fs_mode_i(mode), .fs_decrypt_i(decrypt),
    .fs_key_i(key_sh), .fs_nonce_i(nonce),
    .fs_din_valid_i(din_valid && !core), .fs_din_ready_o(fs_din_ready), .fs_din_i(din),
    .fs_dout_valid_o(fs_dout_valid), .fs_dout_o(fs_dout),
    .fs_tag_valid_o(fs_tag_valid), .fs_tag_o(fs_tag),
    .fs_rnd_i(rnd_fs), .fs_rnd_en_o(fs_rnd_en), .fs_busy_o(fs_busy), .fs_stall_o(fs_stall),
    .ps_start_i(start && core), .ps_mode_i(mode), .ps_decrypt_i(decrypt),
    .ps_key_i(key_sh), .ps_nonce_i(nonce),
    .ps_din_valid_i(din_valid && core), .ps_din_ready_o(ps_din_ready), .ps_din_i(din),
    .ps_dout_valid_o(ps_dout_valid), .ps_dout_o(ps_dout),
    .ps_tag_valid_o(ps_tag_valid), .ps_tag_o(ps_tag),
    .ps_rnd_i(rnd_ps), .ps_rnd_en_o(ps_rnd_en), .ps_busy_o(ps_busy), .ps_stall_o(ps_stall),
    .ar_en_i(ar_en), .ar_sel_i(ar_sel), .ar_x_i(ar_x), .ar_rnd_i(ar_rnd), .ar_acc_o(ar_acc)
  );

  logic                din_ready, dout_valid, tag_valid, rnd_en, busy, stall;
  word_t               dout;
  logic [D-1:0][127:0] tag_sh;
  assign din_ready  = core ? ps_din_ready  : fs_din_ready;
  assign dout_valid = core ? ps_dout_valid : fs_dout_valid;
  assign tag_valid  = core ? ps_tag_valid  : fs_tag_valid;
  assign rnd_en     = core ? ps_rnd_en     : fs_rnd_en;
  assign busy       = core ? ps_busy       : fs_busy;
  assign stall      = core ? ps_stall      : fs_stall;
  assign dout       = core ? ps_dout       : fs_dout;
  assign tag_sh     = core ? ps_tag        : fs_tag;

  int checks = 0, failures = 0, cycles = 0;
  // mechanism counters
  int n_masked = 0, n_frozen = 0, n_gated = 0, n_unrolled = 0, n_to_lev = 0, n_to_uni = 0;
  int n_dec = 0, n_stall = 0, n_tag_zero = 0, n_ar_restart = 0, n_ar_acc = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    for (int i = 0; i < RB / 32; i++) begin
      rnd_fs[32*i +: 32] <= $urandom;
      rnd_ps[32*i +: 32] <= $urandom;
    end
    if (busy && rnd_en) n_masked++;
    if (busy && !rnd_en) n_frozen++;
    if (!core && fs_busy && !dut.u_fs.en_sh[1] && dut.u_fs.en_sh[0]) n_gated++;
    if (core && ps_busy && dut.u_ps.c.lev_pb) n_unrolled++;
    if (stall) n_stall++;
    if (busy && !tag_valid && tag_sh == '0) n_tag_zero++;
    if (!tag_valid) check(tag_sh == '0, "tag output is zero until valid");
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Runs one operation on the selected core; returns output bytes, tag, cycles.
  task automatic run_op(input mode_e m, input logic dec, input logic [127:0] k,
                        input logic [127:0] n, input bq_t ad, input bq_t msg,
                        input int gap_pct, output bq_t out, output logic [127:0] tag,
                        output int lat);
    blk_t blks[$];
    int   t0, nb;
    blk_t b;
    logic [127:0] t;
    if (ad.size() > 0) begin
      nb = ad.size() / 8 + 1;
      for (int i = 0; i < nb; i++) begin
        b.typ = BLK_AD; b.nbytes = 4'((ad.size() - 8*i) > 8 ? 8 : ad.size() - 8*i);
        b.data = '0;
        for (int j = 0; j < int'(b.nbytes); j++) b.data[63-8*j -: 8] = ad[8*i+j];
        blks.push_back(b);
      end
    end
    nb = msg.size() / 8 + 1;
    for (int i = 0; i < nb; i++) begin
      b.typ = BLK_MSG; b.nbytes = 4'((msg.size() - 8*i) > 8 ? 8 : msg.size() - 8*i);
      b.data = '0;
      for (int j = 0; j < int'(b.nbytes); j++) b.data[63-8*j -: 8] = msg[8*i+j];
      blks.push_back(b);
    end
    t = '0;
    for (int s = 1; s < D; s++) begin
      key_sh[s] = {$urandom, $urandom, $urandom, $urandom};
      t ^= key_sh[s];
    end
    key_sh[0] = k ^ t;
    nonce = n; mode = m; decrypt = dec;
    out = {};
    @(negedge clk);
    start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    fork
      begin : feed
        while (blks.size() > 0) begin
          din_valid = ($urandom_range(99) >= gap_pct);
          din = blks[0];
          @(posedge clk);
          if (din_valid && din_ready) void'(blks.pop_front());
          @(negedge clk);
        end
        din_valid = 1'b0;
      end
      begin : watch
        while (!tag_valid) begin
          @(posedge clk);
          if (dout_valid)
            for (int j = 0; j < 8; j++)
              if (out.size() < msg.size()) out.push_back(dout[63-8*j -: 8]);
        end
      end
    join
    lat = cycles - t0;
    tag = '0;
    for (int s = 0; s < D; s++) tag ^= tag_sh[s];
  endtask

  initial begin
    bq_t ad, msg, ct, ct_ref, pt;
    logic [127:0] key, non, tag, tag_ref;
    int lat, exp_lat, nad, nmsg, gap, pb;
    mode_e m, last_m;
    logic b, acc_ref;

    start = 0; din_valid = 0; decrypt = 0; mode = MODE_UNIFORM; core = 1'b0;
    key_sh = '0; nonce = '0; din = '0;
    ar_en = 0; ar_sel = 0; ar_x = '0; ar_rnd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < 2; c++) begin
      core = 1'(c);
      last_m = MODE_UNIFORM;
      for (int it = 0; it < 8; it++) begin
        key = {$urandom, $urandom, $urandom, $urandom};
        non = {$urandom, $urandom, $urandom, $urandom};
        ad = {}; msg = {};
        repeat ($urandom_range(1, 20)) ad.push_back(8'($urandom));
        repeat ($urandom_range(8, 40)) msg.push_back(8'($urandom));
        m   = (it % 4 == 1 || it % 4 == 2) ? MODE_LEVELED : MODE_UNIFORM;
        gap = (it % 4 == 3) ? 90 : 0;
        encrypt(key, non, ad, msg, ct_ref, tag_ref);
        nad  = ad.size() / 8 + 1;
        nmsg = msg.size() / 8 + 1;
        pb   = (core && m == MODE_LEVELED) ? 6 / U : 6;
        exp_lat = 1 + 24 + pb * (nad + nmsg - 1);

        run_op(m, 1'b0, key, non, ad, msg, gap, ct, tag, lat);
        check(ct == ct_ref, $sformatf("core %0d op %0d ciphertext", c, it));
        check(tag == tag_ref, $sformatf("core %0d op %0d tag", c, it));
        if (gap == 0) check(lat == exp_lat, $sformatf("core %0d op %0d latency %0d vs %0d", c, it, lat, exp_lat));
        if (m != last_m) begin
          if (m == MODE_LEVELED) n_to_lev++; else n_to_uni++;
        end
        last_m = m;

        run_op(m, 1'b1, key, non, ad, ct_ref, gap, pt, tag, lat);
        check(pt == msg, $sformatf("core %0d op %0d decrypted plaintext", c, it));
        check(tag == tag_ref, $sformatf("core %0d op %0d decryption tag", c, it));
        n_dec++;
      end
    end

    // AND reduction
    @(negedge clk);
    ar_en = 1'b1;
    for (int v = 0; v < 30; v++) begin
      acc_ref = 1'b1;
      for (int i = 0; i < 12; i++) begin
        @(negedge clk);
        b = (v % 2 == 0) ? 1'b1 : ($urandom_range(99) < 85);
        acc_ref &= b;
        ar_sel = (i == 0);
        if (ar_sel) n_ar_restart++; else n_ar_acc++;
        ar_x[1] = 1'($urandom); ar_x[0] = b ^ ar_x[1];
        ar_rnd = 5'($urandom);
        @(posedge clk);
        #1;
        check((ar_acc[0] ^ ar_acc[1]) == acc_ref, $sformatf("AND reduction vector %0d bit %0d", v, i));
      end
    end

    $display("masked=%0d frozen=%0d gated=%0d unrolled=%0d to_leveled=%0d to_uniform=%0d",
             n_masked, n_frozen, n_gated, n_unrolled, n_to_lev, n_to_uni);
    $display("decryptions=%0d stalls=%0d tag_zero=%0d ar_restart=%0d ar_accumulate=%0d",
             n_dec, n_stall, n_tag_zero, n_ar_restart, n_ar_acc);
    check(n_masked > 0,     "mechanism: masked rounds with fresh randomness");
    check(n_frozen > 0,     "mechanism: randomness frozen in leveled mode");
    check(n_gated > 0,      "mechanism: upper shares clock-gated in FS leveled mode");
    check(n_unrolled > 0,   "mechanism: unrolled unprotected permutation in PS");
    check(n_to_lev > 0,     "mechanism: switch uniform to leveled");
    check(n_to_uni > 0,     "mechanism: switch leveled to uniform");
    check(n_dec > 0,        "mechanism: decryption");
    check(n_stall > 0,      "mechanism: stall at a block boundary");
    check(n_tag_zero > 0,   "mechanism: tag held at zero until valid");
    check(n_ar_restart > 0, "mechanism: AND reduction restart");
    check(n_ar_acc > 0,     "mechanism: AND reduction accumulation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

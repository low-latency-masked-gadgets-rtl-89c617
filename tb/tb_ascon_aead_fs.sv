// tb_ascon_aead_fs: self-checking test of the fully shared multi-target core.
//
// Runs Ascon-128 operations in both modes, encrypting and decrypting, with
// random keys (given as random D-share sharings), nonces, AD and message
// lengths, and random gaps on the data port. Ciphertext, plaintext and tag are
// compared with the byte-level reference model ascon_ref_pkg; the first
// operation is the published known-answer vector (key = nonce = 00..0f, empty
// AD and message). It also checks the cycle count from start to tag for
// operations without gaps (1 + 24 + 6*(nAD + nMSG - 1)), that leveled mode
// requests randomness for exactly the 24 masked rounds, and that gaps stall
// the core without changing its result.
module tb_ascon_aead_fs;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;

  localparam int unsigned D  = 2;
  localparam int unsigned RB = 5*64*5*D*(D-1)/2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                start, decrypt, din_valid, din_ready, dout_valid, tag_valid;
  logic                rnd_en, busy, stall;
  mode_e               mode;
  logic [D-1:0][127:0] key_sh, tag_sh;
  logic [127:0]        nonce;
  blk_t                din;
  word_t               dout;
  logic [RB-1:0]       rnd;

  ascon_aead_fs #(.D(D)) dut (
    .clk, .rst_n, .start_i(start), .mode_i(mode), .decrypt_i(decrypt),
    .key_i(key_sh), .nonce_i(nonce),
    .din_valid_i(din_valid), .din_ready_o(din_ready), .din_i(din),
    .dout_valid_o(dout_valid), .dout_o(dout),
    .tag_valid_o(tag_valid), .tag_o(tag_sh),
    .rnd_i(rnd), .rnd_en_o(rnd_en), .busy_o(busy), .stall_o(stall)
  );

  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_lev = 0, n_uni = 0, n_dec = 0;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    for (int i = 0; i < RB / 32; i++) rnd[32*i +: 32] <= $urandom;
    if (stall) n_stall <= n_stall + 1;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Runs one operation; returns output bytes, tag, cycles and rnd_en count.
  task automatic run_op(input mode_e m, input logic dec, input logic [127:0] k,
                        input logic [127:0] n, input bq_t ad, input bq_t msg,
                        input int gap_pct, output bq_t out, output logic [127:0] tag,
                        output int lat, output int nrnd);
    blk_t blks[$];
    int   t0, nb;
    blk_t b;
    logic [127:0] t;
    // block list
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
      b.data = {$urandom, $urandom};  // garbage in unused bytes
      for (int j = 0; j < int'(b.nbytes); j++) b.data[63-8*j -: 8] = msg[8*i+j];
      blks.push_back(b);
    end
    // random key sharing
    t = '0;
    for (int s = 1; s < D; s++) begin
      key_sh[s] = {$urandom, $urandom, $urandom, $urandom};
      t ^= key_sh[s];
    end
    key_sh[0] = k ^ t;
    nonce = n; mode = m; decrypt = dec;
    out = {};
    nrnd = 0;
    @(negedge clk);
    start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    fork
      begin : feed
        while (blks.size() > 0) begin
          din_valid = ($urandom_range(99) >= gap_pct);
          din = din_valid ? blks[0] : blk_t'({$urandom, $urandom, $urandom});
          @(posedge clk);
          if (din_valid && din_ready) void'(blks.pop_front());
          @(negedge clk);
        end
        din_valid = 1'b0;
      end
      begin : watch
        while (!tag_valid) begin
          @(posedge clk);
          if (rnd_en) nrnd++;
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
    logic [127:0] key, non, tag, tag_ref, tag_dec;
    int lat, nrnd, exp_lat, nad, nmsg, gap;
    mode_e m;

    start = 0; din_valid = 0; decrypt = 0; mode = MODE_UNIFORM;
    key_sh = '0; nonce = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // known-answer vector
    ad = {}; msg = {};
    run_op(MODE_UNIFORM, 1'b0, 128'h000102030405060708090a0b0c0d0e0f,
           128'h000102030405060708090a0b0c0d0e0f, ad, msg, 0, ct, tag, lat, nrnd);
    check(tag == 128'he355159f292911f794cb1432a0103a8a, "known-answer tag");
    check(lat == 1 + 24, "known-answer latency");

    for (int it = 0; it < 24; it++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      non = {$urandom, $urandom, $urandom, $urandom};
      ad = {}; msg = {};
      repeat ($urandom_range(it % 3 == 0 ? 0 : 20)) ad.push_back(8'($urandom));
      repeat ($urandom_range(33)) msg.push_back(8'($urandom));
      m   = mode_e'(it % 2);
      gap = (it % 4 == 2) ? 40 : (it % 4 == 3) ? 92 : 0;
      encrypt(key, non, ad, msg, ct_ref, tag_ref);
      nad  = ad.size() > 0 ? ad.size() / 8 + 1 : 0;
      nmsg = msg.size() / 8 + 1;
      exp_lat = 1 + 24 + 6 * (nad + nmsg - 1);

      run_op(m, 1'b0, key, non, ad, msg, gap, ct, tag, lat, nrnd);
      check(ct == ct_ref, $sformatf("op %0d ciphertext", it));
      check(tag == tag_ref, $sformatf("op %0d tag", it));
      if (gap == 0) check(lat == exp_lat, $sformatf("op %0d latency %0d vs %0d", it, lat, exp_lat));
      else check(lat >= exp_lat, $sformatf("op %0d stalled latency", it));
      if (m == MODE_LEVELED) begin
        check(nrnd == 24, $sformatf("op %0d leveled randomness cycles %0d", it, nrnd));
        n_lev++;
      end else begin
        check(nrnd == exp_lat - 1, $sformatf("op %0d uniform randomness cycles %0d", it, nrnd));
        n_uni++;
      end

      run_op(m, 1'b1, key, non, ad, ct_ref, gap, pt, tag_dec, lat, nrnd);
      check(pt == msg, $sformatf("op %0d decrypted plaintext", it));
      check(tag_dec == tag_ref, $sformatf("op %0d decryption tag", it));
      n_dec++;
    end

    check(n_stall > 0, "stall happened");
    check(n_lev > 0 && n_uni > 0 && n_dec > 0, "both modes and decryption used");
    $display("stall cycles=%0d leveled ops=%0d uniform ops=%0d decryptions=%0d",
             n_stall, n_lev, n_uni, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

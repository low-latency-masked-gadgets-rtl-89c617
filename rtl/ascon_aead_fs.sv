// ascon_aead_fs: multi-target masked Ascon-128 with full resource sharing.
//
// One round-based masked permutation (ascon_round_masked, HPC4 gadgets, one
// round per cycle) serves every permutation call. The security target is
// chosen per operation:
//   MODE_UNIFORM  every permutation runs masked with fresh randomness
//                 (integrity and confidentiality with leakage in encryption
//                 and decryption). With the mode tied to MODE_UNIFORM this is
//                 the single-target uniformly protected core.
//   MODE_LEVELED  initialisation and finalisation run masked; the p^b calls
//                 of the data processing run unmasked on share 0 while the
//                 registers of shares 1..D-1 are held (clock enable low) and
//                 rnd_en_o is low, so the randomness source may be frozen.
// On entering the unmasked phase the masked state, with the key already
// added, is folded into share 0 and the other shares are written with zero;
// they stay zero, so the finalisation restarts from share 0 plus the masked
// key and needs no extra cycle.
//
// Datapath (Figure-9 style): input mux {IV,K,N} / feedback, XOR with the
// key mux (key or zero, select from a flip-flop), XOR of the data block into
// x0, the permutation, and a tag output muxed with zero. The key is given as
// D shares; the nonce and the data are public and enter share 0.
//
// Data port: blocks through a valid/ready buffer (see ascon_ctrl). When a
// message block is absorbed, dout_valid_o is high for that cycle and dout_o
// holds the ciphertext (encryption) or plaintext (decryption) bytes, the
// unused low bytes zero. tag_o holds the D shares of the tag while
// tag_valid_o is high; their XOR is the Ascon-128 tag. rnd_i carries the
// 5*64*5*D(D-1)/2 gadget random bits (1600 for D = 2) of the current cycle.
// Latency (no stall, uniform or leveled): 1 + 24 + 6*(nAD + nMSG - 1) cycles
// from start_i to tag_valid_o.
module ascon_aead_fs
  import ascon_pkg::*;
#(
  parameter int unsigned D = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start_i,
  input  mode_e                         mode_i,
  input  logic                          decrypt_i,
  input  logic [D-1:0][127:0]           key_i,
  input  logic [127:0]                  nonce_i,
  input  logic                          din_valid_i,
  output logic                          din_ready_o,
  input  blk_t                          din_i,
  output logic                          dout_valid_o,
  output word_t                         dout_o,
  output logic                          tag_valid_o,
  output logic [D-1:0][127:0]           tag_o,
  input  logic [5*64*5*D*(D-1)/2-1:0]   rnd_i,
  output logic                          rnd_en_o,
  output logic                          busy_o,
  output logic                          stall_o
);

  ctrl_t          c;
  blk_t           blk;
  state_t [D-1:0] s_out, s_pre, s_key, s_in;
  logic   [D-1:0] en_sh;
  word_t          rate, xin, dout;

  ascon_ctrl #(.LEV_STEP(1)) u_ctrl (
    .clk, .rst_n, .start_i, .mode_i, .decrypt_i,
    .din_valid_i, .din_ready_o, .din_i,
    .blk_o(blk), .ctrl_o(c), .busy_o, .stall_o
  );

  always_comb begin
    // input mux and key mux
    for (int s = 0; s < D; s++) begin
      if (c.load)
        s_pre[s] = (s == 0) ? {nonce_i[63:0], nonce_i[127:64], key_i[s][63:0],
                               key_i[s][127:64], IV_ASCON128}
                            : {64'd0, 64'd0, key_i[s][63:0], key_i[s][127:64], 64'd0};
      else
        s_pre[s] = s_out[s];
      s_key[s]    = s_pre[s];
      s_key[s][3] = s_key[s][3] ^ (c.key_init ? key_i[s][127:64] : 64'd0);
      s_key[s][4] = s_key[s][4] ^ (c.key_init ? key_i[s][63:0]   : 64'd0);
      s_key[s][1] = s_key[s][1] ^ (c.key_fin  ? key_i[s][127:64] : 64'd0);
      s_key[s][2] = s_key[s][2] ^ (c.key_fin  ? key_i[s][63:0]   : 64'd0);
    end

    // the rate is public once combined with the data block
    rate = '0;
    for (int s = 0; s < D; s++) rate = rate ^ s_key[s][0];
    if (blk.typ == BLK_MSG && c.decrypt) begin
      dout = keep_bytes(rate ^ blk.data, blk.nbytes);
      xin  = pad_block(dout, blk.nbytes);
    end else begin
      xin  = pad_block(blk.data, blk.nbytes);
      dout = keep_bytes(rate ^ xin, blk.nbytes);
    end

    // fold into share 0 when the unmasked phase begins
    s_in = s_key;
    if (c.lev_enter) begin
      for (int s = 1; s < D; s++) begin
        for (int k = 0; k < 5; k++) s_in[0][k] = s_in[0][k] ^ s_key[s][k];
        s_in[s] = '0;
      end
    end
    if (c.absorb) s_in[0][0] = s_in[0][0] ^ xin;
    if (c.dsep)   s_in[0][4] = s_in[0][4] ^ 64'd1;

    // share 0 always runs; the others are held during unmasked rounds
    for (int s = 0; s < D; s++)
      en_sh[s] = c.en && ((s == 0) || !c.lev_pb || c.lev_enter);
  end

  ascon_round_masked #(.D(D)) u_perm (
    .clk, .en(en_sh), .unprot(c.lev_pb), .rc_idx(c.rc_idx),
    .s_in, .rnd(rnd_i), .s_out
  );

  assign dout_valid_o = c.absorb && (blk.typ == BLK_MSG);
  assign dout_o       = dout;
  assign rnd_en_o     = c.en && !c.lev_pb;
  assign tag_valid_o  = c.tag_en;
  always_comb
    for (int s = 0; s < D; s++)
      tag_o[s] = c.tag_en ? {s_key[s][3], s_key[s][4]} : 128'd0;

endmodule

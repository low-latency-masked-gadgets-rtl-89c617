// ascon_aead_ps: multi-target masked Ascon-128 with partial resource sharing.
//
// Two permutations share one mode datapath: a masked round-based
// permutation (ascon_round_masked, HPC4 gadgets, one round per cycle) and an
// unprotected permutation (ascon_perm_unr) computing U rounds per cycle.
//   MODE_UNIFORM  every permutation, data processing included, runs on the
//                 masked permutation; the unprotected one is idle.
//   MODE_LEVELED  the masked permutation computes the initialisation; its
//                 state, with the key added, is recombined and handed to the
//                 unprotected permutation, which absorbs AD and message and
//                 runs every p^b in 6/U cycles. With the last message block
//                 the state returns (as share 0, other shares zero) to the
//                 masked permutation for the finalisation and the tag.
// With the mode tied to MODE_LEVELED this is the single-target leveled core.
// The masked permutation's registers and rnd_en_o are idle while the
// unprotected one runs.
//
// Ports and block format are those of ascon_aead_fs. Latency (no stall):
// 1 + 24 + 6*(nAD + nMSG - 1) cycles in uniform mode and
// 1 + 24 + (6/U)*(nAD + nMSG - 1) cycles in leveled mode, from start_i to
// tag_valid_o. U must divide 6.
module ascon_aead_ps
  import ascon_pkg::*;
#(
  parameter int unsigned D = 2,
  parameter int unsigned U = 3
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
  state_t         s_comb, u_pre, u_in, u_q;
  logic   [D-1:0] en_sh;
  logic           unp_live;
  word_t          rate, xin, dout;

  ascon_ctrl #(.LEV_STEP(U)) u_ctrl (
    .clk, .rst_n, .start_i, .mode_i, .decrypt_i,
    .din_valid_i, .din_ready_o, .din_i,
    .blk_o(blk), .ctrl_o(c), .busy_o, .stall_o
  );

  always_comb begin
    // masked side: input mux {IV,K,N} / masked feedback / unprotected state
    for (int s = 0; s < D; s++) begin
      if (c.load)
        s_pre[s] = (s == 0) ? {nonce_i[63:0], nonce_i[127:64], key_i[s][63:0],
                               key_i[s][127:64], IV_ASCON128}
                            : {64'd0, 64'd0, key_i[s][63:0], key_i[s][127:64], 64'd0};
      else if (c.lev_exit)
        s_pre[s] = (s == 0) ? u_q : '0;
      else
        s_pre[s] = s_out[s];
      s_key[s]    = s_pre[s];
      s_key[s][3] = s_key[s][3] ^ (c.key_init ? key_i[s][127:64] : 64'd0);
      s_key[s][4] = s_key[s][4] ^ (c.key_init ? key_i[s][63:0]   : 64'd0);
      s_key[s][1] = s_key[s][1] ^ (c.key_fin  ? key_i[s][127:64] : 64'd0);
      s_key[s][2] = s_key[s][2] ^ (c.key_fin  ? key_i[s][63:0]   : 64'd0);
    end
    s_comb = '0;
    for (int s = 0; s < D; s++)
      for (int k = 0; k < 5; k++) s_comb[k] = s_comb[k] ^ s_key[s][k];

    // unprotected side: takes the recombined masked state once, then loops
    unp_live = c.lev_pb && !c.lev_enter;
    u_pre    = c.lev_enter ? s_comb : u_q;

    rate = unp_live ? u_q[0] : s_comb[0];
    if (blk.typ == BLK_MSG && c.decrypt) begin
      dout = keep_bytes(rate ^ blk.data, blk.nbytes);
      xin  = pad_block(dout, blk.nbytes);
    end else begin
      xin  = pad_block(blk.data, blk.nbytes);
      dout = keep_bytes(rate ^ xin, blk.nbytes);
    end

    s_in = s_key;
    u_in = u_pre;
    if (c.lev_pb) begin
      if (c.absorb) u_in[0] = u_in[0] ^ xin;
      if (c.dsep)   u_in[4] = u_in[4] ^ 64'd1;
    end else begin
      if (c.absorb) s_in[0][0] = s_in[0][0] ^ xin;
      if (c.dsep)   s_in[0][4] = s_in[0][4] ^ 64'd1;
    end

    for (int s = 0; s < D; s++) en_sh[s] = c.en && !c.lev_pb;
  end

  ascon_round_masked #(.D(D)) u_mperm (
    .clk, .en(en_sh), .unprot(1'b0), .rc_idx(c.rc_idx),
    .s_in, .rnd(rnd_i), .s_out
  );

  ascon_perm_unr #(.U(U)) u_uperm (
    .clk, .en(c.lev_pb), .rc_idx(c.rc_idx), .s_in(u_in), .s_q(u_q)
  );

  assign dout_valid_o = c.absorb && (blk.typ == BLK_MSG);
  assign dout_o       = dout;
  assign rnd_en_o     = c.en && !c.lev_pb;
  assign tag_valid_o  = c.tag_en;
  always_comb
    for (int s = 0; s < D; s++)
      tag_o[s] = c.tag_en ? {s_key[s][3], s_key[s][4]} : 128'd0;

endmodule

// ascon_ref_pkg: byte-level software model of Ascon-128 for the testbenches.
//
// Written independently of the RTL: the S-box is the 32-entry lookup table
// of the Ascon specification applied column by column, the round constants
// are 0xf0 - 15*i, and the mode works on byte queues with explicit padding.
// encrypt() returns ciphertext and tag; decrypt is encryption's inverse and
// is checked in the testbenches by running the core on the ciphertext.
package ascon_ref_pkg;

  typedef logic [63:0] w64_t;
  typedef w64_t st_t [5];
  typedef byte unsigned bq_t[$];

  localparam byte unsigned SBOX [32] = '{
    8'h04, 8'h0b, 8'h1f, 8'h14, 8'h1a, 8'h15, 8'h09, 8'h02,
    8'h1b, 8'h05, 8'h08, 8'h12, 8'h1d, 8'h03, 8'h06, 8'h1c,
    8'h1e, 8'h13, 8'h07, 8'h0e, 8'h00, 8'h0d, 8'h11, 8'h18,
    8'h10, 8'h0c, 8'h01, 8'h19, 8'h16, 8'h0a, 8'h0f, 8'h17
  };

  function automatic w64_t ror(w64_t x, int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  // One round with round index r (0..11).
  function automatic void round_ref(ref st_t s, input int r);
    st_t t;
    s[2] ^= 64'(8'hf0 - 8'(r) * 8'h0f);
    for (int b = 0; b < 64; b++) begin
      int unsigned v;
      v = 32'({s[0][b], s[1][b], s[2][b], s[3][b], s[4][b]});
      v = 32'(SBOX[v]);
      for (int k = 0; k < 5; k++) t[k][b] = v[4-k];
    end
    s[0] = t[0] ^ ror(t[0], 19) ^ ror(t[0], 28);
    s[1] = t[1] ^ ror(t[1], 61) ^ ror(t[1], 39);
    s[2] = t[2] ^ ror(t[2], 1)  ^ ror(t[2], 6);
    s[3] = t[3] ^ ror(t[3], 10) ^ ror(t[3], 17);
    s[4] = t[4] ^ ror(t[4], 7)  ^ ror(t[4], 41);
  endfunction

  function automatic void perm(ref st_t s, input int rounds);
    for (int r = 12 - rounds; r < 12; r++) round_ref(s, r);
  endfunction

  // 8 bytes of q from offset o, padded with 0x80 0x00.. past its end.
  function automatic w64_t get_blk(bq_t q, int o);
    w64_t w = '0;
    for (int i = 0; i < 8; i++) begin
      byte unsigned v;
      if (o + i < q.size()) v = q[o+i];
      else if (o + i == q.size()) v = 8'h80;
      else v = 8'h00;
      w[63-8*i -: 8] = v;
    end
    return w;
  endfunction

  function automatic void encrypt(input logic [127:0] key, input logic [127:0] nonce,
                                  input bq_t ad, input bq_t pt,
                                  output bq_t ct, output logic [127:0] tag);
    st_t s;
    int nb;
    s[0] = 64'h80400c0600000000;
    s[1] = key[127:64]; s[2] = key[63:0];
    s[3] = nonce[127:64]; s[4] = nonce[63:0];
    perm(s, 12);
    s[3] ^= key[127:64]; s[4] ^= key[63:0];
    if (ad.size() > 0) begin
      nb = ad.size() / 8 + 1;
      for (int i = 0; i < nb; i++) begin
        s[0] ^= get_blk(ad, 8 * i);
        perm(s, 6);
      end
    end
    s[4] ^= 64'd1;
    ct = {};
    nb = pt.size() / 8 + 1;
    for (int i = 0; i < nb; i++) begin
      s[0] ^= get_blk(pt, 8 * i);
      for (int j = 0; j < 8 && 8 * i + j < pt.size(); j++) ct.push_back(s[0][63-8*j -: 8]);
      if (i < nb - 1) perm(s, 6);
    end
    s[1] ^= key[127:64]; s[2] ^= key[63:0];
    perm(s, 12);
    tag = {s[3] ^ key[127:64], s[4] ^ key[63:0]};
  endfunction

endpackage

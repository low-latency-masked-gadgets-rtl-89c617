// ascon_pkg: types, constants and pure functions shared by the masked and
// unprotected Ascon datapaths.
//
// The Ascon state is five 64-bit words x0..x4. Word x0 is the rate that
// absorbs data; bit 63 of a word is its first (most significant) bit, so a
// byte string maps onto the words big-endian, as in the Ascon specification.
// The constants follow Ascon-128 (64-bit rate, 12 initialisation and
// finalisation rounds, 6 rounds between data blocks). The per-share layer
// functions below are linear or affine, so a masked datapath applies them to
// every share and adds the affine constants to share 0 only.
package ascon_pkg;

  typedef logic [63:0] word_t;
  typedef word_t [4:0] state_t;  // index k holds word xk

  localparam int unsigned ROUNDS_A = 12;  // p^a
  localparam int unsigned ROUNDS_B = 6;   // p^b
  localparam word_t       IV_ASCON128 = 64'h8040_0c06_0000_0000;

  // Security target chosen at run time by the multi-target cores.
  typedef enum logic {
    MODE_UNIFORM = 1'b0,  // every permutation masked (CIML2 + CCAmL2)
    MODE_LEVELED = 1'b1   // message processing unprotected (CIML2 + CCAmL1)
  } mode_e;

  // Kind of the 64-bit block presented on a core's data port.
  typedef enum logic {
    BLK_AD  = 1'b0,  // associated data
    BLK_MSG = 1'b1   // plaintext (encryption) or ciphertext (decryption)
  } blk_e;

  // One data block as handed to a core: nbytes valid bytes at the top of
  // data. A block with nbytes < 8 is the last of its kind (Ascon pads every
  // input, so the last block always has at most 7 bytes; it may have 0).
  typedef struct packed {
    blk_e       typ;
    logic [3:0] nbytes;
    word_t      data;
  } blk_t;

  // Per-cycle controls from ascon_ctrl to a core's datapath. key_init,
  // key_fin and tag_en come straight from flip-flops.
  typedef struct packed {
    logic       en;         // state registers advance this cycle
    logic       load;       // state input is IV || K || N
    logic [3:0] rc_idx;     // round index of the (first) round this cycle
    logic       lev_pb;     // leveled mode, unprotected p^b round(s) this cycle
    logic       lev_enter;  // first unprotected cycle: fold masked state into one share
    logic       lev_exit;   // unprotected state re-enters the masked permutation
    logic       key_init;   // add K to x3 || x4 (after p^a of the initialisation, tag)
    logic       key_fin;    // add K to x1 || x2 (ahead of the finalisation)
    logic       absorb;     // the buffered block is absorbed this cycle
    logic       dsep;       // domain separation: x4 ^= 1
    logic       decrypt;    // message blocks are ciphertext
    logic       tag_en;     // tag output enabled
  } ctrl_t;

  // Round constant of round index i (0..11); p^b uses indices 6..11.
  function automatic logic [7:0] round_const(input logic [3:0] i);
    return {4'hF - i, i};
  endfunction

  function automatic word_t rotr(input word_t x, input int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  // Linear diffusion layer pL.
  function automatic state_t lin_layer(input state_t s);
    state_t o;
    o[0] = s[0] ^ rotr(s[0], 19) ^ rotr(s[0], 28);
    o[1] = s[1] ^ rotr(s[1], 61) ^ rotr(s[1], 39);
    o[2] = s[2] ^ rotr(s[2], 1)  ^ rotr(s[2], 6);
    o[3] = s[3] ^ rotr(s[3], 10) ^ rotr(s[3], 17);
    o[4] = s[4] ^ rotr(s[4], 7)  ^ rotr(s[4], 41);
    return o;
  endfunction

  // pS1: the linear part of the S-box layer ahead of its AND gates.
  function automatic state_t sbox_pre(input state_t s);
    state_t o;
    o    = s;
    o[0] = s[0] ^ s[4];
    o[4] = s[4] ^ s[3];
    o[2] = s[2] ^ s[1];
    return o;
  endfunction

  // pS2 after the AND terms t (t[k] = ~a[k] & a[k+1]) are known: the linear
  // part of the S-box layer behind its AND gates. inv selects whether the
  // final complement of x2 is applied (share 0 only).
  function automatic state_t sbox_post(input state_t a, input state_t t,
                                       input logic inv);
    state_t b, o;
    for (int k = 0; k < 5; k++) b[k] = a[k] ^ t[(k + 1) % 5];
    o    = b;
    o[1] = b[1] ^ b[0];
    o[0] = b[0] ^ b[4];
    o[3] = b[3] ^ b[2];
    o[2] = inv ? ~b[2] : b[2];
    return o;
  endfunction

  // One unprotected Ascon round with round index i.
  function automatic state_t round_fn(input state_t s, input logic [3:0] i);
    state_t a, t;
    a = s;
    a[2][7:0] = a[2][7:0] ^ round_const(i);
    a = sbox_pre(a);
    for (int k = 0; k < 5; k++) t[k] = ~a[k] & a[(k + 1) % 5];
    return lin_layer(sbox_post(a, t, 1'b1));
  endfunction

  // Ascon padding of a 64-bit block holding nbytes (0..7) data bytes at its
  // top: the data bytes are kept, a 0x80 byte follows them, the rest is 0.
  // With nbytes = 8 the block is returned unchanged (a full block).
  function automatic word_t pad_block(input word_t d, input logic [3:0] nbytes);
    word_t o;
    o = '0;
    for (int b = 0; b < 8; b++) begin
      if (b < int'(nbytes)) o[63-8*b -: 8] = d[63-8*b -: 8];
      else if (b == int'(nbytes)) o[63-8*b -: 8] = 8'h80;
    end
    return o;
  endfunction

  // Keeps the top nbytes bytes of a block and clears the others.
  function automatic word_t keep_bytes(input word_t d, input logic [3:0] nbytes);
    word_t o;
    o = '0;
    for (int b = 0; b < 8; b++)
      if (b < int'(nbytes)) o[63-8*b -: 8] = d[63-8*b -: 8];
    return o;
  endfunction

endpackage

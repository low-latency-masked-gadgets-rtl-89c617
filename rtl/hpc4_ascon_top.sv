// hpc4_ascon_top: the three HPC4-based designs side by side.
//
//   fs_*  ascon_aead_fs   multi-target Ascon-128, full resource sharing: one
//                         masked round-based permutation for both modes
//   ps_*  ascon_aead_ps   multi-target Ascon-128, partial resource sharing:
//                         masked permutation plus an unprotected permutation
//                         unrolled U times for the leveled mode
//   ar_*  and_reduce_iter iterative masked AND reduction (one HPC4 gadget)
//
// The three share only the clock (and the reset, which the AND reduction
// does not need); each brings out its own ports, described in its module.
// The masking randomness of each is an input: in a system it comes from a
// PRNG (for example a set of Trivium instances) that may pause while rnd_en
// is low. D is the number of shares of every design; U the unrolling factor
// of the partially shared core.
module hpc4_ascon_top
  import ascon_pkg::*;
#(
  parameter int unsigned D = 2,
  parameter int unsigned U = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // fully shared multi-target core
  input  logic                          fs_start_i,
  input  mode_e                         fs_mode_i,
  input  logic                          fs_decrypt_i,
  input  logic [D-1:0][127:0]           fs_key_i,
  input  logic [127:0]                  fs_nonce_i,
  input  logic                          fs_din_valid_i,
  output logic                          fs_din_ready_o,
  input  blk_t                          fs_din_i,
  output logic                          fs_dout_valid_o,
  output word_t                         fs_dout_o,
  output logic                          fs_tag_valid_o,
  output logic [D-1:0][127:0]           fs_tag_o,
  input  logic [5*64*5*D*(D-1)/2-1:0]   fs_rnd_i,
  output logic                          fs_rnd_en_o,
  output logic                          fs_busy_o,
  output logic                          fs_stall_o,
  // partially shared multi-target core
  input  logic                          ps_start_i,
  input  mode_e                         ps_mode_i,
  input  logic                          ps_decrypt_i,
  input  logic [D-1:0][127:0]           ps_key_i,
  input  logic [127:0]                  ps_nonce_i,
  input  logic                          ps_din_valid_i,
  output logic                          ps_din_ready_o,
  input  blk_t                          ps_din_i,
  output logic                          ps_dout_valid_o,
  output word_t                         ps_dout_o,
  output logic                          ps_tag_valid_o,
  output logic [D-1:0][127:0]           ps_tag_o,
  input  logic [5*64*5*D*(D-1)/2-1:0]   ps_rnd_i,
  output logic                          ps_rnd_en_o,
  output logic                          ps_busy_o,
  output logic                          ps_stall_o,
  // iterative AND reduction
  input  logic                          ar_en_i,
  input  logic                          ar_sel_i,
  input  logic [D-1:0]                  ar_x_i,
  input  logic [5*D*(D-1)/2-1:0]        ar_rnd_i,
  output logic [D-1:0]                  ar_acc_o
);

  ascon_aead_fs #(.D(D)) u_fs (
    .clk, .rst_n,
    .start_i(fs_start_i), .mode_i(fs_mode_i), .decrypt_i(fs_decrypt_i),
    .key_i(fs_key_i), .nonce_i(fs_nonce_i),
    .din_valid_i(fs_din_valid_i), .din_ready_o(fs_din_ready_o), .din_i(fs_din_i),
    .dout_valid_o(fs_dout_valid_o), .dout_o(fs_dout_o),
    .tag_valid_o(fs_tag_valid_o), .tag_o(fs_tag_o),
    .rnd_i(fs_rnd_i), .rnd_en_o(fs_rnd_en_o), .busy_o(fs_busy_o), .stall_o(fs_stall_o)
  );

  ascon_aead_ps #(.D(D), .U(U)) u_ps (
    .clk, .rst_n,
    .start_i(ps_start_i), .mode_i(ps_mode_i), .decrypt_i(ps_decrypt_i),
    .key_i(ps_key_i), .nonce_i(ps_nonce_i),
    .din_valid_i(ps_din_valid_i), .din_ready_o(ps_din_ready_o), .din_i(ps_din_i),
    .dout_valid_o(ps_dout_valid_o), .dout_o(ps_dout_o),
    .tag_valid_o(ps_tag_valid_o), .tag_o(ps_tag_o),
    .rnd_i(ps_rnd_i), .rnd_en_o(ps_rnd_en_o), .busy_o(ps_busy_o), .stall_o(ps_stall_o)
  );

  and_reduce_iter #(.D(D)) u_ar (
    .clk, .en_i(ar_en_i), .sel_i(ar_sel_i), .x_i(ar_x_i), .rnd_i(ar_rnd_i),
    .acc_o(ar_acc_o)
  );

endmodule

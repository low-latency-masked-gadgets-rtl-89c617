// ascon_round_masked: one round of the masked Ascon permutation per cycle.
//
// A round is pC (round constant), pS (5-bit S-box layer, 64 in parallel) and
// pL (linear layer). The S-box is split around its only non-linear step:
// pS1 is the linear part ahead of the five AND gates, pS2 the part behind
// them. The AND gates are 5 x 64 single-cycle HPC4 gadgets; the five S-box
// words that pS2 needs besides the AND results go through synchronisation
// registers clocked with the gadgets. That register layer is the only one in
// the round, so it is also the state register of a round-based permutation:
// a core feeds s_out back to s_in and obtains one round per clock cycle.
//
//   s_in --pC--pS1--+--[HPC4 x320]--+--pS2--pL--> s_out (combinational)
//                   +----[sync]-----+
//
// All linear steps act on each share separately; the affine constants (round
// constant, the complement of the AND input and of x2) go to share 0. Each
// AND term t_k = ~a_k & a_{k+1} is one gadget with x = ~a_k, y = a_{k+1}.
//
// Interface: s_in, rc_idx, unprot and rnd are sampled at a clock edge when the
// share enables en[] allow it; s_out shows the round result from then on.
// rnd carries 5 x 64 gadget randomness blocks (gadget k at offset
// k*64*5*D*(D-1)/2, packed as in hpc4_and): 1600 bits per round for D = 2.
// unprot = 1 runs the round unmasked on share 0 (see hpc4_and_shared); the
// other shares must then be zero at s_in or clock-gated through en[].
module ascon_round_masked
  import ascon_pkg::*;
#(
  parameter int unsigned D = 2
) (
  input  logic                            clk,
  input  logic [D-1:0]                    en,
  input  logic                            unprot,
  input  logic [3:0]                      rc_idx,
  input  state_t [D-1:0]                  s_in,
  input  logic [5*64*5*D*(D-1)/2-1:0]     rnd,
  output state_t [D-1:0]                  s_out
);

  localparam int unsigned RG = 64 * 5 * D * (D - 1) / 2;  // bits per gadget

  state_t [D-1:0] a, a_q;
  logic [4:0][D-1:0][63:0] gx, gy, gz;   // gadget k, share s

  always_comb begin
    for (int s = 0; s < D; s++) begin
      a[s] = s_in[s];
      if (s == 0) a[s][2][7:0] = a[s][2][7:0] ^ round_const(rc_idx);
      a[s] = sbox_pre(a[s]);
    end
    for (int k = 0; k < 5; k++)
      for (int s = 0; s < D; s++) begin
        gx[k][s] = (s == 0) ? ~a[s][k] : a[s][k];
        gy[k][s] = a[s][(k + 1) % 5];
      end
  end

  for (genvar k = 0; k < 5; k++) begin : g_and
    hpc4_and_shared #(.D(D), .W(64)) u_g (
      .clk, .en, .unprot,
      .x(gx[k]), .y(gy[k]),
      .r(rnd[k*RG +: RG]),
      .z(gz[k])
    );
  end

  for (genvar s = 0; s < D; s++) begin : g_sync
    always_ff @(posedge clk) if (en[s]) a_q[s] <= a[s];
  end

  always_comb begin
    for (int s = 0; s < D; s++) begin
      state_t t;
      for (int k = 0; k < 5; k++) t[k] = gz[k][s];
      s_out[s] = lin_layer(sbox_post(a_q[s], t, s == 0));
    end
  end

endmodule

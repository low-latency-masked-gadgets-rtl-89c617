// hpc4_and_shared: HPC4 AND gadget that can also compute an unmasked AND.
//
// This is the gadget used when one masked permutation serves both the
// masked and the unprotected parts of a leveled mode. In masked operation
// (unprot = 0) it is the plain HPC4 gadget. In unprotected operation
// (unprot = 1) the whole value is carried by share 0: output share 0 then
// forwards the registered product Reg[x_0 y_0] that the gadget computes
// anyway, and all other output shares are forced to 0, so the cross terms,
// which mix shares, never reach the outputs. Each output share passes through
// a 2:1 mux, as in the published sharing variant of the gadget.
//
// The mux select is the unprot input registered alongside the gadget's
// registers (captured when en[0] is high), so it always describes what the
// registers hold and changes on a clock edge only. Timing, randomness packing
// and en[] are as in hpc4_and. The published text says the last share keeps
// running while the published drawing keeps share 0; share 0 is used here.
module hpc4_and_shared #(
  parameter int unsigned D = 2,
  parameter int unsigned W = 1
) (
  input  logic                        clk,
  input  logic [D-1:0]                en,
  input  logic                        unprot,
  input  logic [D-1:0][W-1:0]         x,
  input  logic [D-1:0][W-1:0]         y,
  input  logic [5*D*(D-1)/2*W-1:0]    r,
  output logic [D-1:0][W-1:0]         z
);

  logic [D-1:0][W-1:0] z_m, xy_q;
  logic                unprot_q;

  hpc4_and #(.D(D), .W(W)) u_and (
    .clk, .en, .x, .y, .r, .z(z_m), .xy_q
  );

  always_ff @(posedge clk) if (en[0]) unprot_q <= unprot;

  always_comb begin
    for (int i = 0; i < D; i++)
      z[i] = unprot_q ? ((i == 0) ? xy_q[i] : '0) : z_m[i];
  end

endmodule

// hpc4_and: single-cycle masked AND gadget (HPC4) over GF(2), W bits wide.
//
// Inputs x and y are d-share Boolean sharings (x = x[0]^...^x[D-1]); the
// output z is a d-share sharing of x & y, valid one clock edge after x, y and
// r are applied. For every pair of shares i != j the gadget registers
//   u_ij = y_j ^ r_ij ^ r'_ij,  v_ij = x_i r_ij ^ r''_ij,  w_ij = x_i r'_ij ^ r'''_ij
// together with x_i and x_i y_i, and forms, after the registers,
//   z_i = Reg[x_i y_i] ^ XOR_{j!=i} ( Reg[x_i] Reg[u_ij] ^ Reg[v_ij] ^ Reg[w_ij] ).
// r_ij and r_ji are independent, r', r'' and r''' are shared by (i,j) and
// (j,i), so the r'' and r''' terms cancel in the sum of the output shares.
// This is the gadget's construction as published; its O-PINI property relies
// on y_j being blinded by two independent randoms that each meet x_i in a
// separate register.
//
// Randomness: 5*D*(D-1)/2 fresh bits per output bit and cycle, on r. For the
// pair p of shares (a,b), a<b, numbered in row order (0,1),(0,2),..,(1,2),..,
// bit lane k of r[(5*p + f)*W + k] carries field f: 0 = r_ab, 1 = r_ba,
// 2 = r'_ab, 3 = r''_ab, 4 = r'''_ab. This packing is this design's choice.
//
// en[i] enables the registers that feed output share i (x_i, x_i y_i and
// u_ij, v_ij, w_ij for all j); a share whose enable is low holds its value,
// which is how a core stalls the gadget or clock-gates shares. The register
// Reg[x_i y_i] is also brought out as xy_q for the sharing variant.
// The registers have no reset: only values written through them are read.
module hpc4_and #(
  parameter int unsigned D = 2,  // number of shares (d)
  parameter int unsigned W = 1   // number of independent bit lanes
) (
  input  logic                        clk,
  input  logic [D-1:0]                en,
  input  logic [D-1:0][W-1:0]         x,
  input  logic [D-1:0][W-1:0]         y,
  input  logic [5*D*(D-1)/2*W-1:0]    r,
  output logic [D-1:0][W-1:0]         z,
  output logic [D-1:0][W-1:0]         xy_q
);

  // Index of pair (a,b), a<b, in row order.
  function automatic int unsigned pair_idx(input int unsigned a, input int unsigned b);
    return a * D - (a * (a + 1)) / 2 + (b - a - 1);
  endfunction

  logic [D-1:0][W-1:0] x_q;

  for (genvar i = 0; i < D; i++) begin : g_share
    logic [W-1:0] term [D];

    always_ff @(posedge clk) begin
      if (en[i]) begin
        x_q[i]  <= x[i];
        xy_q[i] <= x[i] & y[i];
      end
    end

    for (genvar j = 0; j < D; j++) begin : g_peer
      if (j != i) begin : g_cross
        localparam int unsigned P  = (i < j) ? pair_idx(i, j) : pair_idx(j, i);
        localparam int unsigned FR = (i < j) ? 0 : 1;  // r_ij is field 0 or 1
        logic [W-1:0] r_ij, r1_ij, r2_ij, r3_ij;
        logic [W-1:0] u_q, v_q, w_q;
        assign r_ij  = r[(5*P + FR)*W +: W];
        assign r1_ij = r[(5*P + 2)*W +: W];
        assign r2_ij = r[(5*P + 3)*W +: W];
        assign r3_ij = r[(5*P + 4)*W +: W];

        always_ff @(posedge clk) begin
          if (en[i]) begin
            u_q <= y[j] ^ r_ij ^ r1_ij;
            v_q <= (x[i] & r_ij) ^ r2_ij;
            w_q <= (x[i] & r1_ij) ^ r3_ij;
          end
        end
        assign term[j] = (x_q[i] & u_q) ^ v_q ^ w_q;
      end else begin : g_self
        assign term[j] = xy_q[i];
      end
    end

    always_comb begin
      z[i] = '0;
      for (int j = 0; j < D; j++) z[i] = z[i] ^ term[j];
    end
  end

endmodule

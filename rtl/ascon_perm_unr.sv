// ascon_perm_unr: unprotected Ascon permutation, U rounds per clock cycle.
//
// Used for the message processing of a leveled core, where side-channel
// protection against simple power analysis comes from the parallel
// datapath alone. U = 1 is the round-based variant (one round per cycle);
// U > 1 chains U round functions between two register layers (unrolled
// variant), which cuts the cycles of a 6-round p^b to 6/U.
//
// Interface: when en is high, the register captures U rounds applied to s_in,
// the first with round index rc_idx, the next ones with rc_idx+1, ...; s_q is
// the registered result. The core builds s_in (feedback, data XOR) itself.
// Round indices past 11 are not meaningful; a caller keeps rc_idx + U <= 12.
module ascon_perm_unr
  import ascon_pkg::*;
#(
  parameter int unsigned U = 3
) (
  input  logic        clk,
  input  logic        en,
  input  logic [3:0]  rc_idx,
  input  state_t      s_in,
  output state_t      s_q
);

  state_t s_chain [U+1];

  assign s_chain[0] = s_in;
  for (genvar i = 0; i < U; i++) begin : g_round
    assign s_chain[i+1] = round_fn(s_chain[i], rc_idx + 4'(i));
  end

  always_ff @(posedge clk) if (en) s_q <= s_chain[U];

endmodule

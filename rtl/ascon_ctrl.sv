// ascon_ctrl: sequencer of an Ascon-128 AEAD core, with its stall buffer.
//
// The datapath it drives has its state register inside the permutation, so
// the cycle that absorbs a data block (or adds the key) also computes the
// first round of the next permutation. One operation is:
//   INIT   12 rounds of p^a on IV || K || N (round indices 0..11)
//   BND    boundary cycle: absorb the buffered block, add K where due, and
//          compute the first round(s) of the next permutation
//   PB     remaining p^b rounds (indices 6..11), then back to BND
//   FIN    remaining p^a rounds after the last message block
//   DONE   tag available (tag_en) until the next start
// In leveled mode (mode_i = MODE_LEVELED at start) the p^b permutations run
// unprotected, LEV_STEP rounds per cycle (LEV_STEP must divide 6); the
// masked permutations always advance one round per cycle.
//
// Stall: blocks arrive through a one-entry buffer (valid/ready). A boundary
// cycle waits, with every register of the datapath held, until the buffer is
// full, so a slow data source freezes the core and releases it without loss.
// The key-mux selects key_init / key_fin and the tag enable are computed one
// cycle ahead and held in flip-flops, so they change only on clock edges.
//
// Block order: optional AD blocks, then message blocks. A block with
// nbytes < 8 closes its kind; the message always ends with one. The first
// message block triggers the domain separation. Latency from start to
// tag_en: 1 + 12 + 6*(nAD + nMSG - 1) + 12 cycles with no stall in uniform
// mode; in leveled mode each p^b takes 6/LEV_STEP cycles.
module ascon_ctrl
  import ascon_pkg::*;
#(
  parameter int unsigned LEV_STEP = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_i,     // accepted in IDLE or DONE
  input  mode_e mode_i,      // sampled at start
  input  logic  decrypt_i,   // sampled at start
  input  logic  din_valid_i,
  output logic  din_ready_o,
  input  blk_t  din_i,
  output blk_t  blk_o,       // the buffered block the datapath absorbs
  output ctrl_t ctrl_o,
  output logic  busy_o,
  output logic  stall_o      // a boundary is waiting for data
);

  typedef enum logic [2:0] {
    C_IDLE, C_INIT, C_BND, C_PB, C_FIN, C_DONE
  } cstate_e;

  cstate_e    st_q, st_d;
  logic [3:0] cnt_q, cnt_d;
  mode_e      mode_q;
  logic       dec_q, after_init_q, msg_seen_q;
  logic       key_init_q, key_fin_q, tag_en_q;
  blk_t       buf_q, buf_d;
  logic       buf_v_q, buf_v_d;

  logic       bnd, consume, next_fin, lev, pb_now;
  logic [3:0] rc, step;
  logic [4:0] rc_next;

  // Is this (buffered) block the last message block?
  function automatic logic is_last_msg(input blk_t b);
    return (b.typ == BLK_MSG) && (b.nbytes < 4'd8);
  endfunction

  assign lev      = (mode_q == MODE_LEVELED);
  assign bnd      = (st_q == C_BND);
  assign consume  = bnd && buf_v_q;
  assign next_fin = is_last_msg(buf_q);
  // unprotected p^b work this cycle
  assign pb_now   = lev && ((st_q == C_PB) || (bnd && !next_fin));
  assign step     = pb_now ? 4'(LEV_STEP) : 4'd1;

  always_comb begin
    unique case (st_q)
      C_BND:   rc = next_fin ? 4'd0 : 4'd6;
      default: rc = cnt_q;
    endcase
  end
  assign rc_next = 5'(rc) + 5'(step);

  // stall buffer
  assign din_ready_o = !buf_v_q || consume;
  always_comb begin
    buf_d   = buf_q;
    buf_v_d = buf_v_q && !consume;
    if (din_valid_i && din_ready_o) begin
      buf_d   = din_i;
      buf_v_d = 1'b1;
    end
  end

  // next state
  always_comb begin
    st_d  = st_q;
    cnt_d = cnt_q;
    unique case (st_q)
      C_IDLE, C_DONE: if (start_i) begin st_d = C_INIT; cnt_d = '0; end
      C_INIT: begin
        cnt_d = cnt_q + 4'd1;
        if (cnt_q == 4'(ROUNDS_A - 1)) st_d = C_BND;
      end
      C_BND: if (buf_v_q) begin
        cnt_d = rc_next[3:0];
        if (next_fin)                  st_d = C_FIN;
        else if (rc_next == 5'd12)     st_d = C_BND;
        else                           st_d = C_PB;
      end
      C_PB: begin
        cnt_d = rc_next[3:0];
        if (rc_next == 5'd12) st_d = C_BND;
      end
      C_FIN: begin
        cnt_d = cnt_q + 4'd1;
        if (cnt_q == 4'(ROUNDS_A - 1)) st_d = C_DONE;
      end
      default: st_d = C_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= C_IDLE;
      cnt_q        <= '0;
      mode_q       <= MODE_UNIFORM;
      dec_q        <= 1'b0;
      after_init_q <= 1'b0;
      msg_seen_q   <= 1'b0;
      buf_q        <= '0;
      buf_v_q      <= 1'b0;
      key_init_q   <= 1'b0;
      key_fin_q    <= 1'b0;
      tag_en_q     <= 1'b0;
    end else begin
      st_q    <= st_d;
      cnt_q   <= cnt_d;
      buf_q   <= buf_d;
      buf_v_q <= buf_v_d;
      if ((st_q == C_IDLE || st_q == C_DONE) && start_i) begin
        mode_q     <= mode_i;
        dec_q      <= decrypt_i;
        msg_seen_q <= 1'b0;
      end
      if (st_q == C_INIT && st_d == C_BND) after_init_q <= 1'b1;
      else if (consume)                    after_init_q <= 1'b0;
      if (consume && buf_q.typ == BLK_MSG) msg_seen_q <= 1'b1;
      // registered key-mux selects and tag enable, decided from next state
      key_init_q <= (st_d == C_BND && (after_init_q || st_q == C_INIT) &&
                     !(consume && st_q == C_BND)) || (st_d == C_DONE);
      key_fin_q  <= (st_d == C_BND) && buf_v_d && is_last_msg(buf_d);
      tag_en_q   <= (st_d == C_DONE);
    end
  end

  always_comb begin
    ctrl_o           = '0;
    ctrl_o.en        = (st_q inside {C_INIT, C_PB, C_FIN}) || consume;
    ctrl_o.load      = (st_q == C_INIT) && (cnt_q == 4'd0);
    ctrl_o.rc_idx    = rc;
    ctrl_o.lev_pb    = pb_now && ctrl_o.en;
    ctrl_o.lev_enter = consume && lev && after_init_q && !next_fin;
    ctrl_o.lev_exit  = consume && lev && !after_init_q && next_fin;
    ctrl_o.key_init  = key_init_q;
    ctrl_o.key_fin   = key_fin_q;
    ctrl_o.absorb    = consume;
    ctrl_o.dsep      = consume && (buf_q.typ == BLK_MSG) && !msg_seen_q;
    ctrl_o.decrypt   = dec_q;
    ctrl_o.tag_en    = tag_en_q;
  end

  assign blk_o   = buf_q;
  assign busy_o  = !(st_q inside {C_IDLE, C_DONE});
  assign stall_o = bnd && !buf_v_q;

endmodule

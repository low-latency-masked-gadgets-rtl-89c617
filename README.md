# Single-cycle masked AND gadgets (HPC4) and low-latency masked Ascon-128

Masking splits every secret bit into `d` random shares whose XOR is the bit.
Linear operations are applied share by share. An AND, however, has to mix
shares, and in hardware this mixing can leak: glitches inside a cycle, and
transitions when a register is overwritten, can recombine shares. Gadgets that
stay secure under glitches usually need two or more register stages per AND,
so a masked Ascon round takes several cycles.

This RTL is built around **HPC4**, a masked AND with a single register stage
that stays composable with glitches and transitions. Because of that, its
output can feed straight back into its own input on the next cycle.
That makes a masked Ascon round take exactly one cycle. The design uses this
in three ways:

* **Masked round-based Ascon-128.** The AEAD core runs one masked round per
  cycle. At 2 shares it consumes 1600 random bits per round.
* **Multi-target cores.** Per operation, a core chooses between two modes:
  * *uniform*: every permutation is masked;
  * *leveled*: only the key-dependent initialisation and finalisation are
    masked, and the message-processing permutations run unprotected, which
    is cheaper in energy and randomness.

  There are two variants of this core:
  * *FS* (full sharing) runs the unprotected rounds on the masked datapath
    itself.
  * *PS* (partial sharing) adds a separate unprotected permutation that
    computes several rounds per cycle.
* **Iterative AND reduction.** A single HPC4 gadget closed on itself computes
  the masked AND of a bit stream, one bit per cycle. An example use is a
  constant-time equality check.

## The HPC4 gadget (`hpc4_and`)

For shares `x_i` and `y_i` (i = 0..d-1) and each ordered pair `i != j`, three
terms are computed and registered:

```
u_ij = y_j ^ r_ij ^ r'_ij
v_ij = x_i & r_ij ^ r''_ij
w_ij = x_i & r'_ij ^ r'''_ij
```

`x_i` and `x_i & y_i` are registered as well. After the registers:

```
z_i = [x_i y_i] ^ XOR_{j != i} ( [x_i] & [u_ij] ^ [v_ij] ^ [w_ij] )
```

Here `[.]` means the registered value. The randomness cancels over the output
shares, as the following sum shows:

```
x_i u_ij ^ v_ij ^ w_ij = x_i y_j ^ r''_ij ^ r'''_ij
```

`r''` and `r'''` appear once for `(i,j)` and once for `(j,i)`. They therefore
cancel in the XOR of all output shares, which is `x & y`. The output shares
are still re-randomised.

No register ever holds a value that combines two shares of the same variable.
Only a single register stage lies between input and output, so the latency
is one cycle.

**Randomness per AND.** Each unordered pair needs 5 bits: `r_ij` and `r_ji`
are independent, and `r'`, `r''` and `r'''` are shared by both orders.

Port `r` packs the pairs `(a<b)` in row order, `(0,1), (0,2), ..., (1,2), ...`.
Each pair occupies 5 fields of `W` bits, in this order:
`r_ab, r_ba, r', r'', r'''`.

This gives `5*d*(d-1)/2` bits per AND. At `d = 2` the gadget has 10 one-bit
registers.

`W` instantiates `W` independent bit-sliced gadgets at once. `en[i]` gates
the registers of share `i`.

### Sharing variant (`hpc4_and_shared`)

An output mux lets the gadget compute an *unmasked* AND on share 0 when
`unprot = 1`:
* output share 0 takes the registered `x_0 & y_0`;
* every other output share is forced to 0.

The `unprot` flag is registered together with the data. So the mux changes at
the same clock edge as the operands it selects.

## Masked Ascon round (`ascon_round_masked`)

The Ascon S-box is split around its only nonlinear layer:

```
pC (round constant, share 0) -> pS1 (x0^=x4, x4^=x3, x2^=x1)
  -> 5 x 64 HPC4 ANDs  t_k = (~a_k) & a_{k+1}   + sync registers for a_k
  -> pS2 (a_k ^= t_{k+1}, x1^=x0, x0^=x4, x3^=x2, x2=~x2)  -> pL (linear layer)
```

The NOT is applied to share 0 only.

The gadget registers and the sync registers are the **only state register**
of the permutation. `s_out` is combinational from those registers. A round
therefore completes every cycle, and the next round is computed from
`s_out`.

Randomness is `320 * 5 * d(d-1)/2` bits per cycle:
* 1600 at d = 2;
* 4800 at d = 3;
* 9600 at d = 4.

## The AEAD cores (`ascon_aead_fs`, `ascon_aead_ps`, `ascon_ctrl`)

Both cores implement Ascon-128:
* rate 64 bits;
* 12-round `p^a`;
* 6-round `p^b`;
* padding `0x80`.

They share the controller `ascon_ctrl`, which steps through the following
states:

| state | what happens |
|-------|--------------|
| INIT  | 12 rounds of `p^a` on `IV || K || N` |
| BND   | one boundary cycle per block: absorb the block, add the key or domain separation, and compute the first round of the next permutation |
| PB    | the remaining `p^b` rounds |
| FIN   | finalisation |
| DONE  | the tag is valid |

Because the state register sits inside the round, absorption costs no extra
cycle. Without stalls, the latency from `start_i` to `tag_valid_o` is:

```
uniform: 1 + 24 + 6     * (nAD + nMSG - 1)
leveled: 1 + 24 + 6/LEV * (nAD + nMSG - 1)     (LEV = 1 in FS, U in PS)
```

Here `nAD` and `nMSG` count padded blocks; the message always has at least
one. The last message block goes straight into finalisation without a `p^b`.

### Key handling and leak-avoiding details

* **Key additions** are an AND of the key shares with a registered select
  flag. They happen:
  * into `x3,x4` after initialisation;
  * into `x1,x2` before finalisation;
  * onto the tag.

  Each flag is computed one cycle early from the next state and held in a
  flip-flop. As a result, the key appears on the datapath only at a clock
  edge, never through a glitching select.
* **Tag output.** `tag_o` is zero except while the tag is valid.
* **Key input.** The key enters as `D` shares on `key_i`. The nonce and IV are
  public and enter on share 0.

### Stalling

Data blocks enter through a one-entry valid/ready buffer. The block format is
`blk_t`:
* `typ`: AD or message;
* `nbytes`: 0..8;
* `data`: 64 bits, first byte in bits 63:56.

A block with fewer than 8 bytes closes its kind.

A boundary cycle waits until the buffer is full. While it waits:
* `stall_o` is high;
* every datapath register, including the gadget registers, is held;
* `rnd_en_o` is low, so the randomness source may pause.

A slow data source therefore only adds cycles.

### Leveled mode on the fully shared core (the hardest part)

FS has one masked round and nothing else. For an unprotected `p^b` it turns
this round into an unmasked round on share 0. It proceeds as follows:

1. **Entering.** In the boundary cycle that starts an unprotected `p^b`, the
   input mux XORs all shares into share 0 and loads zeros into the others.
   This unmasks the state. That is acceptable in leveled mode, where the
   message-processing state is not protected.
2. **Running.**
   * The upper shares' registers are clock-gated (`en[s] = 0` for s > 0), so
     they stay zero.
   * The gadgets run with `unprot = 1`, so the AND output of share 0 is
     exactly `x_0 & y_0`.
   * The affine layers act share-wise. Share 0 therefore evolves exactly like
     an unmasked Ascon state.
   * `rnd_en_o` is low: no randomness is used.
3. **Leaving.** The boundary cycle before finalisation loads share 0 as it is
   and the zero upper shares, and switches the gadgets back to masked mode.
   The finalisation's key addition then re-masks the state, because the key
   arrives shared.

In leveled mode, randomness is therefore consumed in exactly 24 cycles per
operation, whatever the message length.

### Partially shared core

PS keeps the masked permutation for INIT and FIN. For leveled `p^b` it uses
`ascon_perm_unr`, an unprotected permutation with `U` rounds per cycle.
* **Entering:** the boundary cycle folds the masked state into it.
* **Leaving:** its state returns as share 0 of the masked side.

While the unprotected side runs, the masked registers are gated and
`rnd_en_o` is low. `U` must divide 6; the default is 3, which gives 2 cycles
per block.

## Iterative AND reduction (`and_reduce_iter`)

A mux picks one of two inputs for the gadget's `x` input:
* with `sel_i = 1`, the sharing of 1 (share 0 = 1, the others 0);
* with `sel_i = 0`, the gadget's own output.

The `y` input is the sharing of the next bit.

To reduce a vector, assert `sel_i` together with bit 0, then clear it for the
following bits. After each clock edge, `acc_o` is the sharing of the AND of
all bits absorbed so far.

This one-cycle loop is safe only because the gadget stays secure when its own
output transitions feed back. Gadgets with a single register stage that lack
this property leak the accumulator.

## Top (`hpc4_ascon_top`)

The top places FS, PS and the AND reduction side by side. Each has its own
`fs_*`, `ps_*` or `ar_*` ports; they share only the clock and reset.
Parameters:
* `D`: number of shares, default 2;
* `U`: PS unrolling, default 3.

Masking randomness is a port. In a system it comes from a PRNG, for example
Trivium instances, that may pause while `rnd_en_o` is low.

## Departures and own choices

* **Which share carries the unmasked value.** In unprotected mode the value
  lives on **share 0**, and the other output shares of the sharing gadget are
  zero. A description that keeps the last share running would be equivalent
  with the indices mirrored.
* **Latency.** The latency counts one `p^b` per block except after the last
  message block, as Ascon-128 requires, plus one load cycle. A formula of the
  form `24 + 6*ceil((m+1)/64)` (30/48/84 cycles for 1/4/10 blocks) counts a
  `p^b` after every block. For the same block counts without AD, this design
  takes 25/43/79 cycles.
* **Initial key load.** The key is loaded together with IV and nonce in the
  start cycle. The alternative is to load `IV || 0 || N` and add the key
  through the key mux. Only the three later key additions and the tag go
  through a registered mux here.
* **Mode selection.** The mode is chosen per operation by `mode_i` at
  `start_i`.
* **Reduced-round unrolling.** Only `U` dividing 6 is supported.
* **Not included:**
  * the PRNG;
  * the HPC2/HPC3 baseline gadgets;
  * the chunked pre-processing for the AND reduction;
  * Keccak and Ketje.
* **Security.** It depends on the synthesis tool keeping gadget terms apart;
  nothing here enforces that.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The Ascon tests compare against a byte-level
reference model, `tb/ascon_ref_pkg.sv`, that includes the published
Ascon-128 known-answer vector.

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/ascon_pkg.sv tb/ascon_ref_pkg.sv rtl/*.sv tb/tb_hpc4_ascon_top.sv \
  --top-module tb_hpc4_ascon_top -Mdir obj
./obj/Vtb_hpc4_ascon_top
```

Replace `tb_hpc4_ascon_top` with any of the following to run the other
testbenches:
* `tb_hpc4_and`;
* `tb_hpc4_and_shared`;
* `tb_ascon_round_masked`;
* `tb_ascon_perm_unr`;
* `tb_ascon_aead_fs`;
* `tb_ascon_aead_ps`;
* `tb_and_reduce_iter`.

What the testbenches cover:
* **`tb_hpc4_ascon_top`** runs the top at default parameters. It checks:
  * ciphertext, plaintext and tag on both cores, in both modes;
  * latencies.

  It also counts every mechanism and fails if any never occurred:
  * masked rounds;
  * frozen randomness;
  * clock-gated shares;
  * unrolled rounds;
  * mode switches;
  * decryption;
  * stalls;
  * the zeroed tag;
  * AND-reduction restart and accumulation.
* **Gadget tests** cover 2, 3 and 4 shares.

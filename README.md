# Masked Ascon-128a with reusable masking hardware

Masking an Ascon core against power analysis makes the S-box layer roughly
(d+1)² times larger for protection order d. The core in this repository pays
that cost once and gets something back for it. Ascon's mode of operation
needs strong protection only where the long-term key is mixed into the state:
the initialization and finalization permutations (p^a, 12 rounds). The
permutations that process associated data and plaintext (p^b, 8 rounds) may
leak without exposing the key. So the masked S-boxes run with shares during
p^a. During p^b the same hardware is reconfigured: the d+1 share "domains" of
every masked S-box then carry d+1 *different* state columns, and the S-box
layer processes (d+1) times as many columns per cycle.

With the default configuration (second-order masking, d = 2, 22 masked
S-boxes):

| permutation | mode            | columns/cycle | cycles/round | cycles/permutation |
|-------------|-----------------|---------------|--------------|--------------------|
| p^a (init, final) | masked, 3 shares | 22      | 5            | 60                 |
| p^b (AD, plaintext) | high-throughput | 66 (64 used) | 2        | 16                 |

Any order d ≥ 1 and any parallelism PAR from 1 to ceil(64/(d+1)) can be set
by parameter. At PAR = ceil(64/(d+1)) (32, 22, 16, 11 for d = 1, 2, 3, 5) one
high-throughput group covers the whole state, so a p^b round always takes
2 cycles.

## Where protection is applied

The encryption follows Ascon-128a (v1.2 specification: 128-bit key, nonce,
rate and tag; IV `80800c0800000000`):

1. state ← IV ‖ K ‖ N, **p^a masked**, state ⊕= 0…0 ‖ K
2. for each associated-data block: rate ⊕= block, **p^b high-throughput**
3. x4 ⊕= 1 (domain separation)
4. for each plaintext block: rate ⊕= block, output rate as ciphertext,
   **p^b high-throughput** (not after the last block)
5. state ⊕= 0…0 ‖ K ‖ 0…0, **p^a masked**, tag = (x3, x4) ⊕ K

Blocks are padded with a single `0x80` byte and zeros. If the last block is
full, an extra all-padding block is processed. With no associated data, step 2
is skipped. With no plaintext, one padding block is absorbed.

## The round datapath

`ascon_round_datapath` computes one round (constant addition, S-box layer,
linear diffusion) each time `round_start` is raised. The state is held
unshared in a 320-bit register, and the S-box layer is swept over it in
column groups. A column is the 5-bit slice `{x4[c],…,x0[c]}` at bit position
c of the five 64-bit words; column c is bit c of the words read as integers.

```
 state reg ─┬─ input network k=0 ─┬─ share creator ──┐ (masked)
            │                     └──────────────────┤ (high-throughput)
            ├─ input network k=1 ────────────────────┤  mux per domain k
            └─ input network k=D ────────────────────┘
                 │ (D+1 domains × PAR columns)
   round-constant add (per domain) → S-box linear layer (per domain)
                 │
           flip-flop stage                      ← register 1
                 │
   chi layer: 5 DOM-AND gadgets per S-box
      masked: through the DOM registers         ← register 2 (masked only)
      high-throughput: taken before them
                 │
   S-box affine layer (per domain)
                 │
   shift register, D+1 rows, PAR columns per shift   (all groups but the last)
                 │
   recombine shares / de-interleave columns → linear diffusion → state reg
```

### Column groups in the two modes

* **Masked.** Group g holds columns g·PAR … g·PAR+PAR−1. The input network of
  domain 0 selects them, and the share creator splits each column into D+1
  shares: shares 1…D are fresh random values, and share 0 is the column XOR
  all of them. A round takes ceil(64/PAR) groups.
* **High-throughput.** S-box p of group g takes columns (g·PAR+p)·(D+1)+k in
  its domains k = 0…D, so neighbouring columns share one S-box (for d = 1,
  domain A takes column 2j and domain B column 2j+1). Each domain's input
  network picks its own columns. A round takes ceil(64/(PAR·(D+1))) groups.
  Column slots past 63 carry zeros, and their results are dropped.

### Constants that must not be shared

Three constants appear in an Ascon round: the round constant (into x2), the
inversion inside chi (x_i ⊕ (¬x_{i+1} · x_{i+2})), and the final NOT of x2 in
the affine layer. Under masking, each must be added to exactly one share. In
high-throughput mode, each must be added to every domain, because every
domain is then a separate column. That is why there are D+1 round-constant
adders: adder k is enabled when k = 0 or the core is in high-throughput mode.
The chi inversion and the affine NOT follow the same rule.

### Pipeline and timing

In the cycle `round_start` is seen, group 0 is issued: it is read from the
state register, shared or distributed, and captured in the **flip-flop
stage**. This register keeps the shares independent at the DOM-AND inputs.

* **Masked mode.** The group next spends a cycle in the DOM-AND
  resharing registers. Its output shares, still separate, then pass the
  affine layer and are shifted into the shift register.
* **High-throughput mode.** The chi result is taken in front of those
  registers, so a group goes from the flip-flop stage straight to the shift
  register.

The last group of a round is not stored. In the cycle it leaves the
affine layer, the recombination logic takes it, plus the stored groups, and
builds the unshared 320-bit S-box output:

* masked: XOR of the shares per column;
* high-throughput: de-interleaving of the domains.

The linear diffusion result is then written into the state register. Because
of this bypass, a round costs ceil(64/PAR)+2 cycles in masked mode and
ceil(64/(PAR·(D+1)))+1 in high-throughput mode. `round_done` pulses when the
new state is in the register. The controller may start the next round in that
same cycle, so rounds run back to back.

The shares are recombined after every masked round, before linear diffusion.
Each masked round therefore starts with fresh shares from the share creator.

### The reconfigurable DOM-AND gadget

`dom_and_reconf` is a DOM-indep multiplier for q = c ⊕ a·b on D+1 shares. It
works in three phases:

1. **Calculation.** All (D+1)² products a_k·b_l are formed.
2. **Resharing.** Each cross-domain product gets a random bit; a_k·b_l and
   a_l·b_k use the same bit, so a gadget draws D(D+1)/2 bits. The own-domain
   product gets c_k XORed in, which saves a separate integration XOR after
   the register. All (D+1)² terms are registered.
3. **Integration.** Share k is the XOR of row k of the registers.

For high-throughput use, the gadget also outputs c_k ⊕ a_k·b_k for each k,
unregistered. The cross-domain products are then unused.

## Controller and interface

`ascon_ctrl` is the phase FSM: idle, permutation, key XOR, associated data,
padding, domain separation, message, final key XOR, tag. It keeps the round
counter: rounds 0–11 for p^a, 4–11 for p^b, using the 12-round constant
numbering. It sets the datapath mode per permutation. All other state updates
(loading IV‖K‖N, key and data XORs) go through a write port of the state
register while no round is in flight.

`ascon_masked_top` ports (synchronous, active-low reset `rst_n`):

| port | dir | width | use |
|------|-----|-------|-----|
| `start`, `key`, `nonce`, `has_ad`, `has_msg`, `rng_seed` | in | 1,128,128,1,1,64 | start an encryption while `busy` is low; the PRNG is reseeded |
| `ad_valid`/`ad_ready`/`ad_data`/`ad_bytes`/`ad_last` | in/out | 1/1/128/5/1 | associated-data blocks: first byte in bits 127:120, 1–16 valid bytes |
| `msg_valid`/`msg_ready`/`msg_data`/`msg_bytes`/`msg_last` | in/out | 1/1/128/5/1 | plaintext blocks, same format |
| `ct_valid`, `ct_data`, `ct_bytes` | out | 1,128,5 | ciphertext block; one-cycle pulse in the cycle its plaintext block is accepted; bytes past `ct_bytes` read as zero |
| `tag_valid`, `tag` | out | 1,128 | tag, one-cycle pulse |
| `busy` | out | 1 | an encryption is in progress |

A block is accepted when valid and ready are both high at a rising edge.
`ready` is high only while the FSM waits for that stream, never during a
permutation. The ciphertext and tag outputs have no back-pressure.

Parameters: `D` (masking order, default 2), `PAR` (masked S-boxes, default
ceil(64/(D+1))), `IV`.

## Randomness

`ascon_rng` is a bank of xorshift64 generators. It delivers every cycle
PAR·5·D bits for share creation and PAR·5·D(D+1)/2 bits for resharing: 550
bits at the defaults. It is reseeded from `rng_seed` at each start. It is a
pseudo-random stand-in. A real device must feed or reseed it from an entropy
source. The resharing randomness could instead be taken from neighbouring
S-box shares ("Changing of the Guards"), which needs no fresh bits for
d ≤ 2. That needs a verified guard assignment, which is not part of this
design. Every DOM-AND here takes fresh bits.

## How far to trust it, and where it departs

* **Functional correctness** is simulated, not proven. The reference model
  in `tb/ascon_ref_pkg.sv` is table-based and reproduces two published known
  answers:
  * Ascon-Hash of the empty string;
  * the Ascon-128a tag for key = nonce = 00…0f with empty inputs,
    `7a834e6f09210957067b10fd831f0078`.

  The whole core matches that model at d = 1, 2, 3 and 5 over many message
  lengths, with random stalls and seeds.
* **Side-channel security is not verified here.** No leakage assessment was
  made on this RTL. Three points need particular care:
  * shares are recombined after every masked round;
  * the PRNG is not an entropy source;
  * synthesis tools may restructure XORs across domains unless the domain
    boundaries are kept.
* **Cipher variant.** Ascon-128a v1.2 with big-endian word order was chosen.
  NIST SP 800-232 Ascon-AEAD128 differs in its IV, byte order and padding. The
  IV is a parameter, but the byte order and padding would also need changes.
* **Encryption only.** There is no decryption or tag verification.
* **PAR limit.** The maximum parallelism is taken as ceil(64/(d+1)): 32, 22,
  16, 11 for d = 1, 2, 3, 5. At d = 2 and d = 5 a high-throughput group has
  two spare column slots.
* **Register-stage size.** The register stage behind the S-boxes holds
  (ceil(64/PAR)−1)·PAR columns per domain, not a full 64: the last group of a
  round bypasses it.
* **Randomness budget.** It is this design's own count. It has not been
  matched against any published implementation.

## Files

| file | block |
|------|-------|
| `rtl/ascon_pkg.sv` | state and column types, round constants, IV, column mapping |
| `rtl/ascon_masked_top.sv` | the core: controller + datapath + RNG |
| `rtl/ascon_ctrl.sv` | phase FSM and state-update path |
| `rtl/ascon_round_datapath.sv` | one-round datapath, both modes |
| `rtl/ascon_input_network.sv` | column selection per domain |
| `rtl/ascon_share_creator.sv` | Boolean sharing |
| `rtl/ascon_rng.sv` | xorshift PRNG bank |
| `rtl/ascon_rc_add.sv` | round-constant addition per domain |
| `rtl/ascon_sbox_linear.sv`, `rtl/ascon_sbox_affine.sv` | S-box input and output layers |
| `rtl/dom_and_reconf.sv`, `rtl/ascon_chi_layer.sv` | reconfigurable DOM-AND and the chi layer built from it |
| `rtl/ascon_state_shift_reg.sv` | register stage behind the S-boxes |
| `rtl/ascon_recomb.sv` | share recombination / column de-interleaving |
| `rtl/ascon_linear_diffusion.sv` | linear diffusion layer |

Every module has a self-checking testbench `tb/tb_<module>.sv`. Three run the
whole core:

* `tb_ascon_masked_top`, at the default size;
* `tb_ascon_masked_top_orders`, at d = 1, 3 and 5;
* `tb_ascon_masked_top_par_sweep`, below the maximum parallelism
  (d = 2 with PAR = 1, 4, 11; d = 1 with PAR = 8).

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ascon_pkg.sv tb/ascon_ref_pkg.sv tb/tb_ascon_masked_top.sv \
    --top-module tb_ascon_masked_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The other files are found
through `-Irtl -Itb` (one module per file, named after the module). The
end-to-end testbench builds in about a minute and simulates in well under a
second.

// ascon_round_datapath: one Ascon round (p_c, p_s, p_l) per request, on a
// datapath whose S-box hardware is either masked or reused for parallel
// columns.
//
// Blocks, in data order: the 320-bit state register; D+1 input networks;
// the share creator (masked mode) or the columns of the input networks
// (high-throughput mode), chosen by a multiplexer per domain; D+1
// round-constant adders; D+1 S-box linear layers; the flip-flop stage;
// the chi layer of PAR S-boxes made of DOM-AND gadgets; D+1 S-box affine
// layers; the (D+1)-domain shift register; share recombination; the linear
// diffusion layer, whose output is written back to the state register.
//
// Masked mode (mode_ht=0): a round handles the 64 columns in NGM =
// ceil(64/PAR) groups of PAR columns, each split into D+1 shares with fresh
// randomness. A group spends one cycle to reach the flip-flop stage, one in
// the DOM-AND registers, and is then shifted into the shift register; the
// last group is recombined straight from the affine outputs together with
// the stored groups. A round takes NGM+2 cycles (5 at D=2, PAR=22).
// High-throughput mode (mode_ht=1): the D+1 domains of each S-box carry
// D+1 different columns, PAR*(D+1) columns per group, and the chi result is
// taken in front of the DOM registers, so a group needs only the
// flip-flop stage: NGH+1 cycles with NGH = ceil(64/(PAR*(D+1))), which is 2
// cycles when PAR = floor(64/(D+1)).
//
// Interface: round_start (only while idle, i.e. busy low or in the cycle
// round_done is high) starts a round using round_idx (0..11, 12-round
// numbering) and mode_ht; the first group is issued in that same cycle.
// round_done is high for one cycle once state_q holds the new state, and
// round_start may be raised in that cycle. st_load writes st_wdata into the
// state register while no round is in flight. rnd must carry fresh bits
// every cycle: the low PAR*5*D bits feed share creation, the rest the
// DOM resharing. Synchronous active-low reset clears the control only.
//
// The order of the blocks follows the architecture this core implements;
// the exact pipeline timing, the bypass of the last group and the column
// order within a group are this design's choices.
module ascon_round_datapath
  import ascon_pkg::*;
#(
  parameter int unsigned D     = 2,
  parameter int unsigned PAR   = 22,
  parameter int unsigned NZ    = D * (D + 1) / 2,
  parameter int unsigned RSC   = PAR * 5 * D,      // share-creation bits
  parameter int unsigned RDOM  = PAR * 5 * NZ,     // DOM resharing bits
  parameter int unsigned RW    = RSC + RDOM
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          st_load,
  input  state_t        st_wdata,
  input  logic          round_start,
  input  logic [3:0]    round_idx,
  input  logic          mode_ht,
  input  logic [RW-1:0] rnd,
  output state_t        state_q,
  output logic          round_done,
  output logic          busy
);
  localparam int unsigned NGM = ngroups(PAR);
  localparam int unsigned NGH = ngroups(PAR * (D + 1));
  localparam int unsigned L   = (NGM - 1) * PAR;

  // ---------------- issue control ----------------
  logic       iss_busy_q;
  logic [5:0] grp_q;
  logic [3:0] ridx_q;
  logic       ht_q;

  logic       issue;
  logic [5:0] grp;
  logic [3:0] ridx;
  logic       ht;
  logic       grp_last;

  always_comb begin
    issue    = round_start || iss_busy_q;
    grp      = round_start ? 6'd0 : grp_q;
    ridx     = round_start ? round_idx : ridx_q;
    ht       = round_start ? mode_ht : ht_q;
    grp_last = ht ? (grp == 6'(NGH - 1)) : (grp == 6'(NGM - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      iss_busy_q <= 1'b0;
      grp_q      <= '0;
      ridx_q     <= '0;
      ht_q       <= 1'b0;
    end else if (issue) begin
      iss_busy_q <= !grp_last;
      grp_q      <= grp + 6'd1;
      ridx_q     <= ridx;
      ht_q       <= ht;
    end
  end

  // ---------------- S-box input side ----------------
  col_t [D:0][PAR-1:0] net_cols, sh_cols, mux_cols, rc_cols, lin_cols;

  for (genvar k = 0; k <= D; k++) begin : g_dom_in
    ascon_input_network #(.D(D), .PAR(PAR), .K(k)) u_net (
      .state (state_q), .group (grp), .mode_ht (ht), .cols (net_cols[k]));
    assign mux_cols[k] = ht ? net_cols[k] : sh_cols[k];
    ascon_rc_add #(.D(D), .PAR(PAR), .K(k)) u_rc (
      .cols_in (mux_cols[k]), .group (grp), .mode_ht (ht), .round_idx (ridx),
      .cols_out (rc_cols[k]));
    ascon_sbox_linear #(.PAR(PAR)) u_lin (.cols_in (rc_cols[k]), .cols_out (lin_cols[k]));
  end

  ascon_share_creator #(.D(D), .PAR(PAR)) u_share (
    .cols (net_cols[0]), .rnd (rnd[RSC-1:0]), .shares (sh_cols));

  // ---------------- flip-flop stage ----------------
  col_t [D:0][PAR-1:0] ff_q;
  logic                v1_q, last1_q;

  always_ff @(posedge clk) begin
    if (issue) ff_q <= lin_cols;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q    <= 1'b0;
      last1_q <= 1'b0;
    end else begin
      v1_q    <= issue;
      last1_q <= issue && grp_last;
    end
  end

  // ---------------- chi (DOM-AND) and affine layers ----------------
  col_t [D:0][PAR-1:0] chi_q, chi_ht, chi_sel, aff_cols;
  logic                v2_q, last2_q;

  ascon_chi_layer #(.D(D), .PAR(PAR)) u_chi (
    .clk (clk), .en (v1_q && !ht_q), .mode_ht (ht_q), .sh (ff_q),
    .z (rnd[RW-1:RSC]), .q (chi_q), .q_ht (chi_ht));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2_q    <= 1'b0;
      last2_q <= 1'b0;
    end else begin
      v2_q    <= v1_q && !ht_q;
      last2_q <= last1_q && !ht_q;
    end
  end

  assign chi_sel = ht_q ? chi_ht : chi_q;

  for (genvar k = 0; k <= D; k++) begin : g_dom_out
    ascon_sbox_affine #(.PAR(PAR)) u_aff (
      .cols_in (chi_sel[k]), .inv ((k == 0) || ht_q), .cols_out (aff_cols[k]));
  end

  // ---------------- register stage, recombination, diffusion ----------------
  logic   commit, commit_last;
  col_t [D:0][L-1:0] sreg_q;
  state_t sbox_state, ldl_state;

  assign commit      = ht_q ? v1_q : v2_q;
  assign commit_last = ht_q ? last1_q : last2_q;

  ascon_state_shift_reg #(.D(D), .PAR(PAR)) u_sreg (
    .clk (clk), .shift (commit && !commit_last), .din (aff_cols), .q (sreg_q));

  ascon_recomb #(.D(D), .PAR(PAR)) u_recomb (
    .sreg (sreg_q), .last (aff_cols), .mode_ht (ht_q), .state (sbox_state));

  ascon_linear_diffusion u_ldl (.s_in (sbox_state), .s_out (ldl_state));

  always_ff @(posedge clk) begin
    if (commit && commit_last) state_q <= ldl_state;
    else if (st_load)          state_q <= st_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) round_done <= 1'b0;
    else        round_done <= commit && commit_last;
  end

  assign busy = iss_busy_q || v1_q || v2_q;

  initial assert (D >= 1 && PAR >= 1 && PAR <= ngroups(D + 1))
    else $error("need D >= 1 and PAR in 1..ceil(64/(D+1))");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    round_start |-> (!busy || round_done));
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    st_load |-> !busy);
endmodule

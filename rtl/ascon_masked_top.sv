// ascon_masked_top: Ascon-128a authenticated encryption with a d-order
// masked permutation whose masking hardware doubles as extra S-box
// parallelism when masking is not needed.
//
// Only the two key-dependent permutations (initialization and
// finalization) need protection against differential power analysis; the
// bulk p^b permutations of associated data and plaintext do not. The core
// therefore runs p^a in masked mode, with D+1 Boolean shares in DOM-AND
// gadgets and PAR S-boxes per cycle, and p^b in high-throughput mode, where
// the same D+1 domains of each S-box process D+1 different columns, i.e.
// PAR*(D+1) columns per cycle. With the default D=2, PAR=22: a masked round
// takes 5 cycles (p^a: 60 cycles) and a high-throughput round 2 cycles
// (p^b: 16 cycles).
//
// Made of ascon_ctrl (phase FSM), ascon_round_datapath (the round
// hardware) and ascon_rng (fresh randomness, reseeded from rng_seed at each
// start). Interface and timing as described in ascon_ctrl: 128-bit
// valid/ready streams for associated data and plaintext, one-cycle
// ciphertext and tag pulses, synchronous active-low reset.
module ascon_masked_top
  import ascon_pkg::*;
#(
  parameter int unsigned D   = 2,
  parameter int unsigned PAR = ngroups(D + 1),   // ceil(64/(D+1))
  parameter logic [63:0] IV  = IV_ASCON128A
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [127:0]  key,
  input  logic [127:0]  nonce,
  input  logic          has_ad,
  input  logic          has_msg,
  input  logic [63:0]   rng_seed,
  output logic          busy,
  input  logic          ad_valid,
  output logic          ad_ready,
  input  logic [127:0]  ad_data,
  input  logic [4:0]    ad_bytes,
  input  logic          ad_last,
  input  logic          msg_valid,
  output logic          msg_ready,
  input  logic [127:0]  msg_data,
  input  logic [4:0]    msg_bytes,
  input  logic          msg_last,
  output logic          ct_valid,
  output logic [127:0]  ct_data,
  output logic [4:0]    ct_bytes,
  output logic          tag_valid,
  output logic [127:0]  tag
);
  localparam int unsigned RW = PAR * 5 * D + PAR * 5 * (D * (D + 1) / 2);

  logic          st_load, round_start, mode_ht, round_done, seed_load, dp_busy;
  logic [3:0]    round_idx;
  state_t        st_wdata, state_q;
  logic [RW-1:0] rnd;

  ascon_ctrl #(.IV(IV)) u_ctrl (
    .clk, .rst_n, .start, .key, .nonce, .has_ad, .has_msg, .busy,
    .rng_seed_load (seed_load),
    .ad_valid, .ad_ready, .ad_data, .ad_bytes, .ad_last,
    .msg_valid, .msg_ready, .msg_data, .msg_bytes, .msg_last,
    .ct_valid, .ct_data, .ct_bytes, .tag_valid, .tag,
    .st_load, .st_wdata, .round_start, .round_idx, .mode_ht,
    .state_q, .round_done);

  ascon_round_datapath #(.D(D), .PAR(PAR)) u_dp (
    .clk, .rst_n, .st_load, .st_wdata, .round_start, .round_idx, .mode_ht,
    .rnd, .state_q, .round_done, .busy (dp_busy));

  ascon_rng #(.W(RW)) u_rng (
    .clk, .rst_n, .seed_load, .seed (rng_seed), .en (1'b1), .rnd);

  // the controller writes the state only between rounds
  a_load_between_rounds: assert property (@(posedge clk) disable iff (!rst_n)
    st_load |-> !dp_busy);
endmodule

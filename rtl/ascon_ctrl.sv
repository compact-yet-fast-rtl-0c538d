// ascon_ctrl: the finite state machine that runs Ascon-128a encryption on
// the round datapath and picks its mode per phase.
//
// Sequence: load IV||K||N; p^a (12 rounds, masked mode); XOR 0*||K;
// absorb each associated-data block into the 128-bit rate followed by p^b
// (8 rounds, high-throughput mode), with the 10* padding, which needs an
// extra all-padding block when the last block is full; XOR the
// domain-separation bit into x4; for each plaintext block XOR it into the
// rate, output the rate as ciphertext and run p^b except after the last
// block (again with an extra padding block after a full last block);
// XOR 0*||K||0*; p^a masked; tag = (x3,x4) XOR K. Only the two p^a
// permutations, where the key is mixed in, run masked; every p^b runs in
// high-throughput mode.
//
// Interface: `start` (while busy is low) samples key, nonce, has_ad,
// has_msg. Data blocks are 128 bits with the first byte in bits 127:120 and
// a byte count of 1..16 (`*_bytes`); a block moves when valid and ready
// are both high, `*_last` marks the last one. ct_valid and tag_valid are
// one-cycle pulses without back-pressure; ct_data has the bytes beyond
// ct_bytes cleared. rng_seed_load asks the RNG to reseed at start. Rounds
// are issued with round_start/round_idx/mode_ht and acknowledged by
// round_done; the next round is issued in the cycle round_done arrives.
// State updates that are not rounds go through st_load/st_wdata.
// Synchronous active-low reset.
module ascon_ctrl
  import ascon_pkg::*;
#(
  parameter logic [63:0] IV = IV_ASCON128A
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  logic [127:0]  key,
  input  logic [127:0]  nonce,
  input  logic          has_ad,
  input  logic          has_msg,
  output logic          busy,
  output logic          rng_seed_load,
  // associated data
  input  logic          ad_valid,
  output logic          ad_ready,
  input  logic [127:0]  ad_data,
  input  logic [4:0]    ad_bytes,
  input  logic          ad_last,
  // plaintext / ciphertext
  input  logic          msg_valid,
  output logic          msg_ready,
  input  logic [127:0]  msg_data,
  input  logic [4:0]    msg_bytes,
  input  logic          msg_last,
  output logic          ct_valid,
  output logic [127:0]  ct_data,
  output logic [4:0]    ct_bytes,
  output logic          tag_valid,
  output logic [127:0]  tag,
  // datapath
  output logic          st_load,
  output state_t        st_wdata,
  output logic          round_start,
  output logic [3:0]    round_idx,
  output logic          mode_ht,
  input  state_t        state_q,
  input  logic          round_done
);
  typedef enum logic [3:0] {
    S_IDLE, S_PERM, S_INIT_KEY, S_AD, S_AD_PAD, S_DSEP,
    S_MSG, S_MSG_PAD, S_FINAL_KEY, S_TAG
  } phase_e;

  localparam logic [127:0] PAD_EMPTY = {8'h80, 120'b0};

  phase_e       ph_q, ret_q;
  logic [127:0] key_q;
  logic         has_msg_q;
  logic         ad_present_q;
  logic [3:0]   rcnt_q;
  logic         first_q, ht_q;

  // 10* padding of a block holding n (1..16) bytes
  function automatic logic [127:0] pad_block(input logic [127:0] d, input logic [4:0] n);
    logic [127:0] mask;
    mask = (n >= 5'd16) ? '1 : ~({128{1'b1}} >> (8 * n));
    return (d & mask) | ((n >= 5'd16) ? '0 : (PAD_EMPTY >> (8 * n)));
  endfunction

  function automatic logic [127:0] byte_mask(input logic [4:0] n);
    return (n >= 5'd16) ? '1 : ~({128{1'b1}} >> (8 * n));
  endfunction

  logic [127:0] rate, ad_blk, msg_blk, ct_new;
  assign rate    = {state_q[0], state_q[1]};
  assign ad_blk  = pad_block(ad_data, ad_bytes);
  assign msg_blk = pad_block(msg_data, msg_bytes);
  assign ct_new  = rate ^ msg_blk;

  // next phase and permutation set-up requested this cycle
  phase_e nxt;
  logic   go_perm, go_ht;
  phase_e go_ret;

  always_comb begin
    nxt           = ph_q;
    go_perm       = 1'b0;
    go_ht         = 1'b0;
    go_ret        = S_IDLE;
    st_load       = 1'b0;
    st_wdata      = state_q;
    round_start   = 1'b0;
    round_idx     = rcnt_q;
    rng_seed_load = 1'b0;
    ad_ready      = 1'b0;
    msg_ready     = 1'b0;
    ct_valid      = 1'b0;
    ct_data       = '0;
    ct_bytes      = msg_bytes;
    tag_valid     = 1'b0;
    tag           = '0;

    unique case (ph_q)
      S_IDLE: if (start) begin
        st_load       = 1'b1;
        st_wdata      = {nonce[63:0], nonce[127:64], key[63:0], key[127:64], IV};
        rng_seed_load = 1'b1;
        go_perm = 1'b1; go_ht = 1'b0; go_ret = S_INIT_KEY;
      end
      S_PERM: begin
        if (first_q) begin
          round_start = 1'b1;
        end else if (round_done) begin
          if (rcnt_q == 4'd11) nxt = ret_q;
          else begin
            round_start = 1'b1;
            round_idx   = rcnt_q + 4'd1;
          end
        end
      end
      S_INIT_KEY: begin
        st_load     = 1'b1;
        st_wdata[3] = state_q[3] ^ key_q[127:64];
        st_wdata[4] = state_q[4] ^ key_q[63:0];
        nxt         = ad_present_q ? S_AD : S_DSEP;
      end
      S_AD: begin
        ad_ready = 1'b1;
        if (ad_valid) begin
          st_load     = 1'b1;
          st_wdata[0] = state_q[0] ^ ad_blk[127:64];
          st_wdata[1] = state_q[1] ^ ad_blk[63:0];
          go_perm = 1'b1; go_ht = 1'b1;
          go_ret  = !ad_last ? S_AD : (ad_bytes >= 5'd16 ? S_AD_PAD : S_DSEP);
        end
      end
      S_AD_PAD: begin
        st_load     = 1'b1;
        st_wdata[0] = state_q[0] ^ PAD_EMPTY[127:64];
        go_perm = 1'b1; go_ht = 1'b1; go_ret = S_DSEP;
      end
      S_DSEP: begin
        st_load     = 1'b1;
        st_wdata[4] = state_q[4] ^ 64'd1;
        nxt         = has_msg_q ? S_MSG : S_MSG_PAD;
      end
      S_MSG: begin
        msg_ready = 1'b1;
        if (msg_valid) begin
          st_load     = 1'b1;
          st_wdata[0] = ct_new[127:64];
          st_wdata[1] = ct_new[63:0];
          ct_valid    = 1'b1;
          ct_data     = ct_new & byte_mask(msg_bytes);
          if (!msg_last) begin
            go_perm = 1'b1; go_ht = 1'b1; go_ret = S_MSG;
          end else if (msg_bytes >= 5'd16) begin
            go_perm = 1'b1; go_ht = 1'b1; go_ret = S_MSG_PAD;
          end else begin
            nxt = S_FINAL_KEY;
          end
        end
      end
      S_MSG_PAD: begin
        st_load     = 1'b1;
        st_wdata[0] = state_q[0] ^ PAD_EMPTY[127:64];
        nxt         = S_FINAL_KEY;
      end
      S_FINAL_KEY: begin
        st_load     = 1'b1;
        st_wdata[2] = state_q[2] ^ key_q[127:64];
        st_wdata[3] = state_q[3] ^ key_q[63:0];
        go_perm = 1'b1; go_ht = 1'b0; go_ret = S_TAG;
      end
      S_TAG: begin
        tag_valid = 1'b1;
        tag       = {state_q[3] ^ key_q[127:64], state_q[4] ^ key_q[63:0]};
        nxt       = S_IDLE;
      end
      default: nxt = S_IDLE;
    endcase
    if (go_perm) nxt = S_PERM;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph_q         <= S_IDLE;
      ret_q        <= S_IDLE;
      key_q        <= '0;
      has_msg_q    <= 1'b0;
      ad_present_q <= 1'b0;
      rcnt_q       <= '0;
      first_q      <= 1'b0;
      ht_q         <= 1'b0;
    end else begin
      ph_q <= nxt;
      if (ph_q == S_IDLE && start) begin
        key_q        <= key;
        has_msg_q    <= has_msg;
        ad_present_q <= has_ad;
      end
      if (go_perm) begin
        ret_q   <= go_ret;
        ht_q    <= go_ht;
        first_q <= 1'b1;
        rcnt_q  <= go_ht ? 4'd4 : 4'd0;   // p^b = last 8 of the 12 rounds
      end else if (round_start) begin
        first_q <= 1'b0;
        rcnt_q  <= round_idx;
      end
    end
  end

  assign mode_ht = ht_q;
  assign busy    = (ph_q != S_IDLE);

  a_ct_with_block: assert property (@(posedge clk) disable iff (!rst_n)
    ct_valid |-> msg_valid && msg_ready);
  a_bytes_range: assert property (@(posedge clk) disable iff (!rst_n)
    (ad_valid && ad_ready |-> ad_bytes inside {[5'd1:5'd16]}) and
    (msg_valid && msg_ready |-> msg_bytes inside {[5'd1:5'd16]}));
  a_no_round_outside_perm: assert property (@(posedge clk) disable iff (!rst_n)
    round_start |-> ph_q == S_PERM);
endmodule

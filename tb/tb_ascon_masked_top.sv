// tb_ascon_masked_top: end-to-end test of the core at its default size
// (second-order masking, 22 S-boxes). It encrypts the Ascon-128a known
// answer (key = nonce = 00..0f, empty inputs, tag 7a834e6f...1f0078) and
// messages of many lengths with random keys, nonces, stalls and PRNG
// seeds, and compares ciphertext and tag with the reference model. It
// checks that every 12-round permutation runs masked in 60 cycles and
// every 8-round permutation in high-throughput mode in 16 cycles, that the
// same input under two seeds gives the same result but different shares,
// and counts the mechanisms the design has: masked and high-throughput
// rounds, mode switches, padding-only blocks after full last blocks,
// partial blocks, empty associated data and plaintext, input stalls and
// reseeding. A mechanism that never occurs counts as a failure.
module tb_ascon_masked_top;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, has_ad = 0, has_msg = 0, busy;
  logic [127:0] key, nonce; logic [63:0] seed = 64'h1;
  logic ad_valid = 0, ad_ready, ad_last = 0; logic [127:0] ad_data = '0; logic [4:0] ad_bytes = 0;
  logic msg_valid = 0, msg_ready, msg_last = 0; logic [127:0] msg_data = '0; logic [4:0] msg_bytes = 0;
  logic ct_valid, tag_valid; logic [127:0] ct_data, tag; logic [4:0] ct_bytes;

  ascon_masked_top dut (.clk, .rst_n, .start, .key, .nonce, .has_ad, .has_msg, .rng_seed (seed), .busy,
    .ad_valid, .ad_ready, .ad_data, .ad_bytes, .ad_last,
    .msg_valid, .msg_ready, .msg_data, .msg_bytes, .msg_last,
    .ct_valid, .ct_data, .ct_bytes, .tag_valid, .tag);

  // ---- mechanism counters ----
  int n_masked_rounds = 0, n_ht_rounds = 0, n_switch = 0, n_ad_pad = 0, n_msg_pad = 0;
  int n_partial = 0, n_empty_ad = 0, n_empty_msg = 0, n_stall = 0, n_reseed = 0;
  logic last_mode = 0; bit any_round = 0;
  int perm_cyc = 0, perm_len = 0; bit in_perm = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.round_start) begin
      if (dut.u_ctrl.mode_ht) n_ht_rounds++; else n_masked_rounds++;
      if (any_round && dut.u_ctrl.mode_ht != last_mode) n_switch++;
      last_mode = dut.u_ctrl.mode_ht; any_round = 1;
      if (dut.u_ctrl.round_idx == 0 || (dut.u_ctrl.round_idx == 4 && dut.u_ctrl.mode_ht)) begin
        in_perm = 1; perm_cyc = 0;
        perm_len = dut.u_ctrl.mode_ht ? 16 : 60;
      end
    end
    if (in_perm) perm_cyc++;
    if (dut.u_dp.round_done && dut.u_ctrl.round_idx == 11 && !dut.u_ctrl.round_start && in_perm) begin
      in_perm = 0;
      checks++;
      if (perm_cyc - 1 != perm_len) begin failures++; $display("permutation took %0d cycles, expected %0d", perm_cyc - 1, perm_len); end
    end
    if (dut.u_ctrl.ph_q == 4'd4 /* S_AD_PAD */) n_ad_pad++;
    if (dut.u_ctrl.ph_q == 4'd7 /* S_MSG_PAD */ && has_msg) n_msg_pad++;
    if ((ad_ready && !ad_valid) || (msg_ready && !msg_valid)) n_stall++;
    if (dut.u_ctrl.rng_seed_load) n_reseed++;
  end

  // ---- output capture ----
  bq_t got_ct; logic [127:0] got_tag; bit tag_seen;
  always @(posedge clk) begin
    if (ct_valid) begin
      for (int i = 0; i < ct_bytes; i++) got_ct.push_back(ct_data[127 - 8 * i -: 8]);
      for (int i = ct_bytes; i < 16; i++) if (ct_data[127 - 8 * i -: 8] != 0) begin failures++; $display("ct byte past end not cleared"); end
    end
    if (tag_valid) begin got_tag = tag; tag_seen = 1; end
  end

  // share 1 of the first masked group after start (pure randomness)
  logic [109:0] share1_snap;
  bit snap_taken;
  always @(posedge clk) if (!snap_taken && busy && dut.u_dp.v1_q && !dut.u_dp.ht_q) begin
    share1_snap <= dut.u_dp.ff_q[1]; snap_taken <= 1;
  end

  task automatic encrypt(input logic [127:0] k, input logic [127:0] n, input bq_t ad, input bq_t pt,
                         input bit stalls, output logic [127:0] t_out);
    bq_t exp_ct; logic [127:0] exp_tag;
    aead_encrypt(k, n, ad, pt, exp_ct, exp_tag);
    got_ct = {}; tag_seen = 0; snap_taken = 0;
    if (ad.size() == 0) n_empty_ad++;
    if (pt.size() == 0) n_empty_msg++;
    if (ad.size() % 16 != 0) n_partial++;
    if (pt.size() % 16 != 0) n_partial++;
    @(negedge clk);
    key = k; nonce = n; has_ad = ad.size() > 0; has_msg = pt.size() > 0; start = 1;
    @(negedge clk); start = 0;
    for (int off = 0; off < ad.size(); off += 16) begin
      int nb; nb = (ad.size() - off > 16) ? 16 : ad.size() - off;
      if (stalls) repeat ($urandom_range(0, 24)) @(negedge clk);
      ad_data = block_of(ad, off, nb, 0); ad_bytes = 5'(nb); ad_last = (off + 16 >= ad.size());
      ad_valid = 1;
      #1; while (!ad_ready) @(negedge clk);
      @(negedge clk); ad_valid = 0;
    end
    for (int off = 0; off < pt.size(); off += 16) begin
      int nb; nb = (pt.size() - off > 16) ? 16 : pt.size() - off;
      if (stalls) repeat ($urandom_range(0, 24)) @(negedge clk);
      msg_data = block_of(pt, off, nb, 0); msg_bytes = 5'(nb); msg_last = (off + 16 >= pt.size());
      msg_valid = 1;
      #1; while (!msg_ready) @(negedge clk);
      @(negedge clk); msg_valid = 0;
    end
    while (!tag_seen) @(negedge clk);
    checks += 2;
    if (got_ct != exp_ct) begin failures++; $display("ct mismatch ad=%0d pt=%0d", ad.size(), pt.size()); end
    if (got_tag !== exp_tag) begin failures++; $display("tag mismatch ad=%0d pt=%0d", ad.size(), pt.size()); end
    t_out = got_tag;
  endtask

  initial begin
    logic [127:0] t0, t1; logic [109:0] s0;
    bq_t e;
    repeat (3) @(negedge clk); rst_n = 1;
    // known answer
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h000102030405060708090a0b0c0d0e0f, e, e, 0, t0);
    checks++;
    if (t0 !== 128'h7a834e6f09210957067b10fd831f0078) begin failures++; $display("KAT tag %h", t0); end
    // lengths around the block boundaries, random stalls and seeds
    for (int la = 0; la <= 48; la += (la < 17 ? 1 : 7)) begin
      bq_t ad, pt; int lp;
      ad = {}; pt = {};
      lp = (la * 7 + 3) % 50;
      if (la == 16) lp = 32;
      for (int i = 0; i < la; i++) ad.push_back(8'($urandom));
      for (int i = 0; i < lp; i++) pt.push_back(8'($urandom));
      seed = {$urandom, $urandom};
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, ad, pt, 1, t0);
    end
    // same input, two seeds: same tag, different shares
    begin
      bq_t ad, pt;
      ad = {}; pt = {};
      for (int i = 0; i < 20; i++) begin ad.push_back(8'(i)); pt.push_back(8'(3 * i)); end
      seed = 64'h1111;
      encrypt(128'h1, 128'h2, ad, pt, 0, t0); s0 = share1_snap;
      seed = 64'h2222;
      encrypt(128'h1, 128'h2, ad, pt, 0, t1);
      checks += 2;
      if (t0 !== t1) begin failures++; $display("tag depends on seed"); end
      if (s0 === share1_snap) begin failures++; $display("shares do not depend on seed"); end
    end
    $display("mechanisms: masked_rounds=%0d ht_rounds=%0d mode_switches=%0d ad_pad=%0d msg_pad=%0d partial=%0d empty_ad=%0d empty_msg=%0d stalls=%0d reseeds=%0d",
             n_masked_rounds, n_ht_rounds, n_switch, n_ad_pad, n_msg_pad, n_partial, n_empty_ad, n_empty_msg, n_stall, n_reseed);
    checks += 10;
    if (n_masked_rounds == 0) failures++;
    if (n_ht_rounds == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_ad_pad == 0) failures++;
    if (n_msg_pad == 0) failures++;
    if (n_partial == 0) failures++;
    if (n_empty_ad == 0) failures++;
    if (n_empty_msg == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_reseed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

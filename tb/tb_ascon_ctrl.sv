// tb_ascon_ctrl: runs the phase FSM against a behavioural round engine
// (the reference round function, answering after 5 cycles in masked mode
// and 2 in high-throughput mode) and checks ciphertext and tag against the
// reference Ascon-128a model for messages of many lengths, including empty
// associated data, empty plaintext and full last blocks. It also checks
// that every 12-round permutation runs masked and every 8-round one in
// high-throughput mode, and that round indices follow 0..11 / 4..11.
module tb_ascon_ctrl;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, has_ad = 0, has_msg = 0, busy, seed_ld;
  logic [127:0] key, nonce;
  logic ad_valid = 0, ad_ready, ad_last = 0; logic [127:0] ad_data; logic [4:0] ad_bytes;
  logic msg_valid = 0, msg_ready, msg_last = 0; logic [127:0] msg_data; logic [4:0] msg_bytes;
  logic ct_valid, tag_valid; logic [127:0] ct_data, tag; logic [4:0] ct_bytes;
  logic st_load, round_start, mode_ht; state_t st_wdata; logic [3:0] round_idx;
  state_t state_q; logic round_done = 0;

  ascon_ctrl dut (.clk, .rst_n, .start, .key, .nonce, .has_ad, .has_msg, .busy,
    .rng_seed_load (seed_ld), .ad_valid, .ad_ready, .ad_data, .ad_bytes, .ad_last,
    .msg_valid, .msg_ready, .msg_data, .msg_bytes, .msg_last, .ct_valid, .ct_data, .ct_bytes,
    .tag_valid, .tag, .st_load, .st_wdata, .round_start, .round_idx, .mode_ht,
    .state_q, .round_done);

  // behavioural round engine
  int wait_c = -1; logic [3:0] ri; logic pht;
  int prev_idx = 11; logic perm_is_b = 0;
  int n_masked_perm = 0, n_ht_perm = 0;
  always @(posedge clk) begin
    round_done <= 1'b0;
    if (st_load) state_q <= st_wdata;
    if (wait_c == 0) begin
      state_q <= state_t'(round(rstate_t'(state_q), int'(ri)));
      round_done <= 1'b1;
    end
    if (wait_c >= 0) wait_c <= wait_c - 1;
    if (round_start) begin
      ri <= round_idx; pht <= mode_ht;
      wait_c <= mode_ht ? 0 : 3;
      if (round_idx == 0 || (round_idx == 4 && prev_idx != 3)) begin
        perm_is_b = (round_idx == 4);
        if (perm_is_b) n_ht_perm++; else n_masked_perm++;
      end else if (int'(round_idx) != prev_idx + 1) begin
        failures++; $display("round index %0d after %0d", round_idx, prev_idx);
      end
      checks++;
      if (mode_ht !== perm_is_b) begin failures++; $display("mode %0b in %s", mode_ht, perm_is_b ? "p^b" : "p^a"); end
      prev_idx = round_idx;
    end
  end

  bq_t got_ct; logic [127:0] got_tag; bit tag_seen;
  always @(posedge clk) begin
    if (ct_valid) for (int i = 0; i < ct_bytes; i++) got_ct.push_back(ct_data[127 - 8 * i -: 8]);
    if (tag_valid) begin got_tag = tag; tag_seen = 1; end
  end

  task automatic encrypt(input logic [127:0] k, input logic [127:0] n, input bq_t ad, input bq_t pt);
    bq_t exp_ct; logic [127:0] exp_tag;
    aead_encrypt(k, n, ad, pt, exp_ct, exp_tag);
    got_ct = {}; tag_seen = 0;
    @(negedge clk);
    key = k; nonce = n; has_ad = ad.size() > 0; has_msg = pt.size() > 0; start = 1;
    @(negedge clk); start = 0;
    for (int off = 0; off < ad.size(); off += 16) begin
      int nb; nb = (ad.size() - off > 16) ? 16 : ad.size() - off;
      ad_data = block_of(ad, off, nb, 0); ad_bytes = 5'(nb); ad_last = (off + 16 >= ad.size());
      ad_valid = 1;
      // ready is stable between edges: once it is seen high, the next
      // rising edge moves the block
      #1; while (!ad_ready) @(negedge clk);
      @(negedge clk); ad_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    for (int off = 0; off < pt.size(); off += 16) begin
      int nb; nb = (pt.size() - off > 16) ? 16 : pt.size() - off;
      msg_data = block_of(pt, off, nb, 0); msg_bytes = 5'(nb); msg_last = (off + 16 >= pt.size());
      msg_valid = 1;
      #1; while (!msg_ready) @(negedge clk);
      @(negedge clk); msg_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    while (!tag_seen) @(negedge clk);
    checks += 2;
    if (got_ct != exp_ct) begin failures++; $display("ct mismatch ad=%0d pt=%0d", ad.size(), pt.size()); end
    if (got_tag !== exp_tag) begin failures++; $display("tag mismatch ad=%0d pt=%0d", ad.size(), pt.size()); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int la = 0; la <= 33; la += 11) for (int lp = 0; lp <= 33; lp += 8) begin
      bq_t ad, pt;
      ad = {}; pt = {};
      for (int i = 0; i < la; i++) ad.push_back(8'($urandom));
      for (int i = 0; i < lp; i++) pt.push_back(8'($urandom));
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, ad, pt);
    end
    begin bq_t ad, pt; ad = {}; pt = {}; for (int i = 0; i < 16; i++) begin ad.push_back(8'(i)); pt.push_back(8'(i)); end
      encrypt('1, '0, ad, pt); end
    checks += 2;
    if (n_masked_perm == 0 || n_ht_perm == 0) failures++;
    if (n_masked_perm != 2 * 21) begin failures++; $display("masked perms %0d", n_masked_perm); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

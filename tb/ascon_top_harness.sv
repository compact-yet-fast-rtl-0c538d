// ascon_top_harness: drives one ascon_masked_top of a given masking order
// D and parallelism PAR through the Ascon-128a known answer and a set of
// random messages, compares with the reference model, and checks the
// permutation latencies: a masked 12-round permutation takes
// 12*(ceil(64/PAR)+2) cycles and a high-throughput 8-round permutation
// 8*(ceil(64/(PAR*(D+1)))+1). Raises `done` with its counts when finished.
module ascon_top_harness
  import ascon_pkg::*;
  import ascon_ref_pkg::*;
#(
  parameter int unsigned D   = 1,
  parameter int unsigned PAR = 32
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int MASKED_PERM = 12 * (ngroups(PAR) + 2);
  localparam int HT_PERM     = 8 * (ngroups(PAR * (D + 1)) + 1);

  logic start = 0, has_ad = 0, has_msg = 0, busy;
  logic [127:0] key, nonce; logic [63:0] seed = 64'h5;
  logic ad_valid = 0, ad_ready, ad_last = 0; logic [127:0] ad_data = '0; logic [4:0] ad_bytes = 0;
  logic msg_valid = 0, msg_ready, msg_last = 0; logic [127:0] msg_data = '0; logic [4:0] msg_bytes = 0;
  logic ct_valid, tag_valid; logic [127:0] ct_data, tag; logic [4:0] ct_bytes;

  ascon_masked_top #(.D(D), .PAR(PAR)) dut (.clk, .rst_n, .start, .key, .nonce, .has_ad, .has_msg,
    .rng_seed (seed), .busy, .ad_valid, .ad_ready, .ad_data, .ad_bytes, .ad_last,
    .msg_valid, .msg_ready, .msg_data, .msg_bytes, .msg_last,
    .ct_valid, .ct_data, .ct_bytes, .tag_valid, .tag);

  int perm_cyc = 0, perm_len = 0; bit in_perm = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.round_start &&
        (dut.u_ctrl.round_idx == 0 || (dut.u_ctrl.round_idx == 4 && dut.u_ctrl.mode_ht))) begin
      in_perm = 1; perm_cyc = 0; perm_len = dut.u_ctrl.mode_ht ? HT_PERM : MASKED_PERM;
    end
    if (in_perm) perm_cyc++;
    if (dut.u_dp.round_done && dut.u_ctrl.round_idx == 11 && !dut.u_ctrl.round_start && in_perm) begin
      in_perm = 0; checks++;
      if (perm_cyc - 1 != perm_len) begin
        failures++; $display("D=%0d PAR=%0d: permutation %0d cycles, expected %0d", D, PAR, perm_cyc - 1, perm_len);
      end
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
    seed = {$urandom, $urandom};
    @(negedge clk); start = 0;
    for (int off = 0; off < ad.size(); off += 16) begin
      int nb; nb = (ad.size() - off > 16) ? 16 : ad.size() - off;
      ad_data = block_of(ad, off, nb, 0); ad_bytes = 5'(nb); ad_last = (off + 16 >= ad.size());
      ad_valid = 1;
      #1; while (!ad_ready) @(negedge clk);
      @(negedge clk); ad_valid = 0;
    end
    for (int off = 0; off < pt.size(); off += 16) begin
      int nb; nb = (pt.size() - off > 16) ? 16 : pt.size() - off;
      msg_data = block_of(pt, off, nb, 0); msg_bytes = 5'(nb); msg_last = (off + 16 >= pt.size());
      msg_valid = 1;
      #1; while (!msg_ready) @(negedge clk);
      @(negedge clk); msg_valid = 0;
    end
    while (!tag_seen) @(negedge clk);
    checks += 2;
    if (got_ct != exp_ct) begin failures++; $display("D=%0d: ct mismatch ad=%0d pt=%0d", D, ad.size(), pt.size()); end
    if (got_tag !== exp_tag) begin failures++; $display("D=%0d: tag mismatch ad=%0d pt=%0d", D, ad.size(), pt.size()); end
  endtask

  initial begin
    bq_t e;
    done = 0; checks = 0; failures = 0;
    e = {};
    @(posedge rst_n);
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h000102030405060708090a0b0c0d0e0f, e, e);
    checks++;
    if (got_tag !== 128'h7a834e6f09210957067b10fd831f0078) begin failures++; $display("D=%0d: KAT tag %h", D, got_tag); end
    for (int t = 0; t < 6; t++) begin
      bq_t ad, pt;
      ad = {}; pt = {};
      for (int i = 0; i < t * 7; i++) ad.push_back(8'($urandom));
      for (int i = 0; i < t * 9 + 1; i++) pt.push_back(8'($urandom));
      encrypt({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, ad, pt);
    end
    done = 1;
  end
endmodule

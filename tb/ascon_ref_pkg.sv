// ascon_ref_pkg: behavioural reference model of Ascon-128a for the
// testbenches, written independently of the RTL: the S-box is the 32-entry
// table of the Ascon specification (MSB = x0), the linear layer uses
// explicit rotations, and the AEAD mode works on byte queues.
// Known answers it reproduces: Ascon-Hash("") = 7346bc14...0d251f91 and the
// Ascon-128a tag 7a834e6f09210957067b10fd831f0078 for key = nonce =
// 00..0f with no associated data and no plaintext.
package ascon_ref_pkg;

  typedef logic [4:0][63:0] rstate_t;
  typedef byte unsigned bq_t[$];

  localparam logic [4:0] SBOX [32] = '{
    5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
    5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
    5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
    5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17 };

  function automatic logic [63:0] ror(input logic [63:0] x, input int n);
    logic [127:0] xx;
    xx = {x, x};
    return xx[n +: 64];
  endfunction

  // S-box on a column given as col[i] = x_i
  function automatic logic [4:0] sbox_col(input logic [4:0] col);
    logic [4:0] v, o, r;
    for (int i = 0; i < 5; i++) v[4 - i] = col[i];
    o = SBOX[v];
    for (int i = 0; i < 5; i++) r[i] = o[4 - i];
    return r;
  endfunction

  function automatic rstate_t ldl(input rstate_t s);
    rstate_t o;
    o[0] = s[0] ^ ror(s[0], 19) ^ ror(s[0], 28);
    o[1] = s[1] ^ ror(s[1], 61) ^ ror(s[1], 39);
    o[2] = s[2] ^ ror(s[2], 1)  ^ ror(s[2], 6);
    o[3] = s[3] ^ ror(s[3], 10) ^ ror(s[3], 17);
    o[4] = s[4] ^ ror(s[4], 7)  ^ ror(s[4], 41);
    return o;
  endfunction

  function automatic rstate_t sbox_layer(input rstate_t s);
    rstate_t o;
    for (int c = 0; c < 64; c++) begin
      logic [4:0] col, res;
      for (int i = 0; i < 5; i++) col[i] = s[i][c];
      res = sbox_col(col);
      for (int i = 0; i < 5; i++) o[i][c] = res[i];
    end
    return o;
  endfunction

  function automatic rstate_t round(input rstate_t s, input int r);
    rstate_t t;
    t = s;
    t[2] = t[2] ^ 64'(((15 - r) << 4) | r);
    return ldl(sbox_layer(t));
  endfunction

  function automatic rstate_t perm(input rstate_t s, input int nr);
    rstate_t t;
    t = s;
    for (int r = 12 - nr; r < 12; r++) t = round(t, r);
    return t;
  endfunction

  function automatic logic [127:0] block_of(input bq_t q, input int off, input int n, input bit pad);
    logic [127:0] b;
    b = '0;
    for (int i = 0; i < n; i++) b[127 - 8 * i -: 8] = q[off + i];
    if (pad && n < 16) b[127 - 8 * n -: 8] = 8'h80;
    return b;
  endfunction

  // Ascon-128a encryption
  task automatic aead_encrypt(input logic [127:0] key, input logic [127:0] nonce,
                              input bq_t ad, input bq_t pt,
                              output bq_t ct, output logic [127:0] tag);
    rstate_t s;
    logic [127:0] b, r;
    int n;
    s = {nonce[63:0], nonce[127:64], key[63:0], key[127:64], 64'h80800c0800000000};
    s = perm(s, 12);
    s[3] ^= key[127:64]; s[4] ^= key[63:0];
    if (ad.size() > 0) begin
      for (int off = 0; off <= ad.size(); off += 16) begin
        n = (ad.size() - off > 16) ? 16 : ad.size() - off;
        b = block_of(ad, off, n, 1);
        s[0] ^= b[127:64]; s[1] ^= b[63:0];
        s = perm(s, 8);
      end
    end
    s[4] ^= 64'd1;
    ct = {};
    for (int off = 0; off <= pt.size(); off += 16) begin
      n = (pt.size() - off > 16) ? 16 : pt.size() - off;
      b = block_of(pt, off, n, 1);
      s[0] ^= b[127:64]; s[1] ^= b[63:0];
      r = {s[0], s[1]};
      for (int i = 0; i < n; i++) ct.push_back(r[127 - 8 * i -: 8]);
      if (off + 16 <= pt.size()) s = perm(s, 8);
    end
    s[2] ^= key[127:64]; s[3] ^= key[63:0];
    s = perm(s, 12);
    tag = {s[3] ^ key[127:64], s[4] ^ key[63:0]};
  endtask

endpackage

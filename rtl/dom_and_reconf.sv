// dom_and_reconf: reconfigurable domain-oriented-masking (DOM-indep) AND-XOR
// gadget computing q = c ^ (a & b) for one bit.
//
// Masked mode (the registered output q): a, b and c arrive as D+1 Boolean
// shares. In the calculation phase every product a[k]&b[l] is formed. The
// own-domain term a[k]&b[k] has c[k] XORed in (the integration XOR moved in
// front of the register, which keeps the logic depth low), and each
// cross-domain term a[k]&b[l], k!=l, is reshared with a random bit; the
// pair (k,l) and (l,k) uses the same bit, so D*(D+1)/2 bits are consumed.
// All (D+1)^2 terms are registered, which stops glitches from crossing
// domains, and in the integration phase output share k is the XOR of row k
// of the registers. Latency: one cycle (registers load when en is high).
//
// High-throughput mode (the combinational output q_ht): the D+1 inputs are
// D+1 unrelated bits from different state columns, and q_ht[k] =
// c[k] ^ a[k]&b[k] is the unmasked result of column k, taken in front of
// the register, so D+1 ANDs run in parallel. The cross-domain products are
// then unused.
//
// The gadget structure follows DOM-indep as the masked Ascon literature
// describes it; the register enable and the separate q_ht output are this
// design's choices.
module dom_and_reconf #(
  parameter int unsigned D  = 2,
  parameter int unsigned NZ = D * (D + 1) / 2
) (
  input  logic          clk,
  input  logic          en,
  input  logic [D:0]    a,
  input  logic [D:0]    b,
  input  logic [D:0]    c,
  input  logic [NZ-1:0] z,
  output logic [D:0]    q,
  output logic [D:0]    q_ht
);
  // index of the random bit shared by the cross terms (k,l) and (l,k)
  function automatic int unsigned zidx(input int unsigned k, input int unsigned l);
    int unsigned lo, hi, idx;
    lo  = (k < l) ? k : l;
    hi  = (k < l) ? l : k;
    idx = 0;
    for (int unsigned i = 0; i < lo; i++) idx += D - i;
    return idx + (hi - lo - 1);
  endfunction

  logic [D:0][D:0] term_d, term_q;

  always_comb begin
    for (int unsigned k = 0; k <= D; k++) begin
      for (int unsigned l = 0; l <= D; l++) begin
        if (k == l) term_d[k][l] = (a[k] & b[l]) ^ c[k];
        else        term_d[k][l] = (a[k] & b[l]) ^ z[zidx(k, l)];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) term_q <= term_d;
  end

  always_comb begin
    for (int unsigned k = 0; k <= D; k++) begin
      q[k]    = ^term_q[k];
      q_ht[k] = term_d[k][k];
    end
  end
endmodule

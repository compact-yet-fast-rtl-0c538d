// ascon_linear_diffusion: the Ascon linear diffusion layer p_l.
//
// Each state word is XORed with two rotations of itself:
//   x0 ^= (x0>>>19)^(x0>>>28)   x1 ^= (x1>>>61)^(x1>>>39)
//   x2 ^= (x2>>> 1)^(x2>>> 6)   x3 ^= (x3>>>10)^(x3>>>17)
//   x4 ^= (x4>>> 7)^(x4>>>41)
// Purely combinational; in the core it sits after share recombination, on
// the unshared state, right in front of the state register.
module ascon_linear_diffusion
  import ascon_pkg::*;
(
  input  state_t s_in,
  output state_t s_out
);
  always_comb begin
    s_out[0] = s_in[0] ^ rotr(s_in[0], 19) ^ rotr(s_in[0], 28);
    s_out[1] = s_in[1] ^ rotr(s_in[1], 61) ^ rotr(s_in[1], 39);
    s_out[2] = s_in[2] ^ rotr(s_in[2],  1) ^ rotr(s_in[2],  6);
    s_out[3] = s_in[3] ^ rotr(s_in[3], 10) ^ rotr(s_in[3], 17);
    s_out[4] = s_in[4] ^ rotr(s_in[4],  7) ^ rotr(s_in[4], 41);
  end
endmodule

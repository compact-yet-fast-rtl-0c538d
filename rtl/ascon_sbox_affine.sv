// ascon_sbox_affine: output affine layer of the Ascon S-box, for PAR columns
// of one share (or one domain).
//
// Per column: x1 ^= x0; x0 ^= x4; x3 ^= x2; x2 = ~x2. The XORs are linear and
// are applied to every share; the NOT of x2 is a constant and must be added
// exactly once per unshared value. `inv` enables it: the core sets it for
// share 0 in masked mode and for every domain in high-throughput mode,
// where each domain carries its own column. Combinational.
module ascon_sbox_affine
  import ascon_pkg::*;
#(
  parameter int unsigned PAR = 22
) (
  input  col_t [PAR-1:0] cols_in,
  input  logic           inv,
  output col_t [PAR-1:0] cols_out
);
  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      cols_out[p][1] = cols_in[p][1] ^ cols_in[p][0];
      cols_out[p][0] = cols_in[p][0] ^ cols_in[p][4];
      cols_out[p][3] = cols_in[p][3] ^ cols_in[p][2];
      cols_out[p][2] = cols_in[p][2] ^ inv;
      cols_out[p][4] = cols_in[p][4];
    end
  end
endmodule

// ascon_sbox_linear: input linear layer of the Ascon S-box, for PAR columns
// of one share (or one domain).
//
// Per column: x0 ^= x4; x4 ^= x3; x2 ^= x1. The layer is linear, so a masked
// design applies it to every share unchanged. Combinational; in the core its
// output is captured by the flip-flop stage in front of the DOM-AND gates.
module ascon_sbox_linear
  import ascon_pkg::*;
#(
  parameter int unsigned PAR = 22
) (
  input  col_t [PAR-1:0] cols_in,
  output col_t [PAR-1:0] cols_out
);
  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      cols_out[p]    = cols_in[p];
      cols_out[p][0] = cols_in[p][0] ^ cols_in[p][4];
      cols_out[p][4] = cols_in[p][4] ^ cols_in[p][3];
      cols_out[p][2] = cols_in[p][2] ^ cols_in[p][1];
    end
  end
endmodule

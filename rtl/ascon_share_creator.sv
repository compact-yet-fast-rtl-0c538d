// ascon_share_creator: Boolean share creation for PAR columns.
//
// Shares 1..D of each column are D fresh random 5-bit values and share 0 is
// the column XORed with all of them, so the XOR of the D+1 shares equals the
// column. rnd holds 5*D bits per column, column p using
// rnd[(p*D+j-1)*5 +: 5] as share j. Combinational; the core uses it in
// masked mode, on the columns chosen by the input network of domain 0.
module ascon_share_creator
  import ascon_pkg::*;
#(
  parameter int unsigned D   = 2,
  parameter int unsigned PAR = 22
) (
  input  col_t [PAR-1:0]      cols,
  input  logic [PAR*5*D-1:0]  rnd,
  output col_t [D:0][PAR-1:0] shares
);
  always_comb begin
    for (int unsigned p = 0; p < PAR; p++) begin
      shares[0][p] = cols[p];
      for (int unsigned j = 1; j <= D; j++) begin
        shares[j][p] = rnd[(p * D + j - 1) * 5 +: 5];
        shares[0][p] = shares[0][p] ^ shares[j][p];
      end
    end
  end
endmodule

// ascon_rc_add: round-constant addition (p_c) for the PAR columns of one
// domain.
//
// The 8-bit round constant of round `round_idx` is XORed into x2 of columns
// 0..7. Each domain has its own copy of this block: in masked mode only
// domain 0 (share 0) adds the constant, since adding it to every share would
// cancel it; in high-throughput mode every domain carries distinct columns
// and adds the constant bits of its own columns. The column of S-box p is
// worked out from `group` exactly as the input network does. Combinational.
module ascon_rc_add
  import ascon_pkg::*;
#(
  parameter int unsigned D   = 2,
  parameter int unsigned PAR = 22,
  parameter int unsigned K   = 0
) (
  input  col_t [PAR-1:0]  cols_in,
  input  logic [5:0]      group,
  input  logic            mode_ht,
  input  logic [3:0]      round_idx,
  output col_t [PAR-1:0]  cols_out
);
  always_comb begin
    logic [7:0] rc;
    rc = round_const(round_idx);
    for (int unsigned p = 0; p < PAR; p++) begin
      int unsigned c;
      c = col_index(D, PAR, K, int'(group), p, mode_ht);
      cols_out[p] = cols_in[p];
      if ((K == 0 || mode_ht) && c < 8) cols_out[p][2] = cols_in[p][2] ^ rc[c[2:0]];
    end
  end
endmodule

// ascon_input_network: column selector of one domain.
//
// From the unshared 320-bit state it picks the PAR columns that domain K
// feeds to the S-boxes in column group `group`: column group*PAR+p in
// masked mode (the core then splits them into shares), and column
// (group*PAR+p)*(D+1)+K in high-throughput mode, so that the D+1 domains of
// one S-box hold D+1 neighbouring columns. Columns past 63 read as zero.
// Combinational.
module ascon_input_network
  import ascon_pkg::*;
#(
  parameter int unsigned D   = 2,
  parameter int unsigned PAR = 22,
  parameter int unsigned K   = 0
) (
  input  state_t          state,
  input  logic [5:0]      group,
  input  logic            mode_ht,
  output col_t [PAR-1:0]  cols
);
  always_comb begin
    for (int unsigned p = 0; p < PAR; p++) begin
      int unsigned c;
      c = col_index(D, PAR, K, int'(group), p, mode_ht);
      cols[p] = (c < NCOL) ? get_col(state, c[5:0]) : '0;
    end
  end
endmodule

// ascon_chi_layer: the non-linear chi mapping of PAR Ascon S-boxes, built from
// five reconfigurable DOM-AND gadgets per S-box (x_i ^= ~x_{i+1} & x_{i+2},
// indices mod 5).
//
// sh[k][p] is column p as seen by domain k: in masked mode a share of one
// column, in high-throughput mode (mode_ht=1) a column of its own. The
// inversion of x_{i+1} is a constant: it is applied to share 0 only in
// masked mode, and to every domain in high-throughput mode. q carries the
// registered masked result (one cycle after en), q_ht the combinational
// high-throughput result. z supplies D*(D+1)/2 fresh bits per gadget, gadget
// (p,i) taking bits [(p*5+i)*NZ +: NZ].
module ascon_chi_layer
  import ascon_pkg::*;
#(
  parameter int unsigned D   = 2,
  parameter int unsigned PAR = 22,
  parameter int unsigned NZ  = D * (D + 1) / 2
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic                  mode_ht,
  input  col_t [D:0][PAR-1:0]   sh,
  input  logic [PAR*5*NZ-1:0]   z,
  output col_t [D:0][PAR-1:0]   q,
  output col_t [D:0][PAR-1:0]   q_ht
);
  for (genvar p = 0; p < PAR; p++) begin : g_sbox
    for (genvar i = 0; i < 5; i++) begin : g_bit
      logic [D:0] a, b, c, qo, qh;
      always_comb begin
        for (int k = 0; k <= D; k++) begin
          a[k] = sh[k][p][(i + 1) % 5] ^ ((k == 0) || mode_ht);
          b[k] = sh[k][p][(i + 2) % 5];
          c[k] = sh[k][p][i];
        end
      end
      dom_and_reconf #(.D(D)) u_and (
        .clk (clk), .en (en), .a (a), .b (b), .c (c),
        .z   (z[(p * 5 + i) * NZ +: NZ]),
        .q   (qo), .q_ht (qh)
      );
      for (genvar k = 0; k <= D; k++) begin : g_out
        assign q[k][p][i]    = qo[k];
        assign q_ht[k][p][i] = qh[k];
      end
    end
  end
endmodule

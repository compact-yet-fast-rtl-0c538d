// ascon_recomb: share recombination. Rebuilds the unshared 320-bit state
// that leaves the S-box layer from the stored column groups (sreg, the
// shift register) and the group finishing this cycle (last).
//
// Masked mode: column c is the XOR of its D+1 shares, found in slot c of
// the shift register for c < L and in position c-L of `last` otherwise.
// High-throughput mode: column c belongs to domain c mod (D+1) and S-box
// slot c div (D+1); with NH = ceil(64/(PAR*(D+1))) groups per round the
// first NH-1 groups lie in the top (NH-1)*PAR slots of the register and the
// rest in `last`. No XOR is needed there. Combinational.
module ascon_recomb
  import ascon_pkg::*;
#(
  parameter int unsigned D   = 2,
  parameter int unsigned PAR = 22,
  parameter int unsigned L   = (ngroups(PAR) - 1) * PAR
) (
  input  col_t [D:0][L-1:0]    sreg,
  input  col_t [D:0][PAR-1:0]  last,
  input  logic                 mode_ht,
  output state_t               state
);
  localparam int unsigned NH   = ngroups(PAR * (D + 1));
  localparam int unsigned HSTO = (NH - 1) * PAR;   // slots stored in HT mode
  localparam int unsigned HOFS = L - HSTO;         // where they start

  always_comb begin
    for (int unsigned c = 0; c < NCOL; c++) begin
      col_t v;
      int unsigned k, s;
      v = '0;
      k = c % (D + 1);
      s = c / (D + 1);
      if (mode_ht) begin
        v = (s + 1 <= HSTO) ? sreg[k][HOFS + s] : last[k][s - HSTO];
      end else begin
        for (int unsigned j = 0; j <= D; j++)
          v = v ^ ((c < L) ? sreg[j][c] : last[j][c - L]);
      end
      for (int unsigned i = 0; i < 5; i++) state[i][c] = v[i];
    end
  end
endmodule

// ascon_state_shift_reg: the register stage behind the S-box layer that
// collects one round's S-box results, D+1 domains wide.
//
// Every cycle that `shift` is high, each domain's row moves down by PAR
// column slots and the PAR new columns enter at the top, so after n shifts
// the group shifted in first sits lowest. The core shifts in every column
// group of a round except the last, which goes straight on to share
// recombination; a row therefore needs L = (ceil(64/PAR)-1)*PAR slots, a
// little under the 64 columns (320 bits) per domain a full round holds.
// No reset: the core reads only slots written in the current round.
module ascon_state_shift_reg
  import ascon_pkg::*;
#(
  parameter int unsigned D   = 2,
  parameter int unsigned PAR = 22,
  parameter int unsigned L   = (ngroups(PAR) - 1) * PAR
) (
  input  logic                 clk,
  input  logic                 shift,
  input  col_t [D:0][PAR-1:0]  din,
  output col_t [D:0][L-1:0]    q
);
  always_ff @(posedge clk) begin
    if (shift) begin
      for (int unsigned k = 0; k <= D; k++) begin
        for (int unsigned s = 0; s < L; s++) begin
          if (s + PAR < L) q[k][s] <= q[k][s + PAR];
          else             q[k][s] <= din[k][s + PAR - L];
        end
      end
    end
  end
endmodule

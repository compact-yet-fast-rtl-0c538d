// tb_ascon_recomb: builds random shared states, lays them out in the
// shift-register and last-group format the datapath uses, and checks the
// recombined state in both modes at the default size (D=2, PAR=22) and at
// D=1, PAR=5, where a high-throughput round spans several groups.
module tb_ascon_recomb;
  import ascon_pkg::*;
  int checks = 0, failures = 0;

  // default size
  col_t [2:0][43:0] sa; col_t [2:0][21:0] la; logic hta; state_t oa;
  ascon_recomb #(.D(2), .PAR(22)) ua (.sreg (sa), .last (la), .mode_ht (hta), .state (oa));
  // small size: NGM = 13, L = 60, NGH = 7
  col_t [1:0][59:0] sb; col_t [1:0][4:0] lb; logic htb; state_t ob;
  ascon_recomb #(.D(1), .PAR(5)) ub (.sreg (sb), .last (lb), .mode_ht (htb), .state (ob));

  function automatic col_t gc(input state_t s, input int c);
    col_t v; for (int i = 0; i < 5; i++) v[i] = s[i][c]; return v;
  endfunction

  initial begin
    state_t want;
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 5; i++) want[i] = {$urandom, $urandom};
      // masked, default: columns 0..43 in sreg, 44..63 in last; share 0 fixes the XOR
      hta = 0; la = '0;
      for (int c = 0; c < 64; c++) begin
        col_t r1, r2;
        r1 = 5'($urandom); r2 = 5'($urandom);
        if (c < 44) begin sa[1][c] = r1; sa[2][c] = r2; sa[0][c] = gc(want, c) ^ r1 ^ r2; end
        else begin la[1][c-44] = r1; la[2][c-44] = r2; la[0][c-44] = gc(want, c) ^ r1 ^ r2; end
      end
      #1; checks++; if (oa !== want) begin failures++; $display("masked default"); end
      // HT, default: one group, column c = p*3+k in last[k][p]
      hta = 1;
      for (int p = 0; p < 22; p++) for (int k = 0; k < 3; k++)
        la[k][p] = (p * 3 + k < 64) ? gc(want, p * 3 + k) : 5'($urandom);
      #1; checks++; if (oa !== want) begin failures++; $display("ht default"); end
      // HT, small: 7 groups of 10 columns; groups 0..5 stored at slots 30+g*5+p
      htb = 1; sb = '0;
      for (int g = 0; g < 7; g++) for (int p = 0; p < 5; p++) for (int k = 0; k < 2; k++) begin
        int c; c = (g * 5 + p) * 2 + k;
        if (g < 6) sb[k][30 + g * 5 + p] = gc(want, c);
        else lb[k][p] = (c < 64) ? gc(want, c) : 5'($urandom);
      end
      #1; checks++; if (ob !== want) begin failures++; $display("ht small"); end
      // masked, small: columns 0..59 in sreg, 60..63 in last
      htb = 0;
      for (int c = 0; c < 65; c++) begin
        col_t r1; r1 = 5'($urandom);
        if (c < 60) begin sb[1][c] = r1; sb[0][c] = gc(want, c) ^ r1; end
        else if (c < 64) begin lb[1][c-60] = r1; lb[0][c-60] = gc(want, c) ^ r1; end
        else begin lb[1][4] = r1; lb[0][4] = r1; end
      end
      #1; checks++; if (ob !== want) begin failures++; $display("masked small"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

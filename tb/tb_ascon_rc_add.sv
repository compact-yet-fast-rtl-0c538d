// tb_ascon_rc_add: for every round index, mode and group, the constant
// bits must appear in x2 of columns 0..7 only, on domain 0 only in masked
// mode and on every domain's own columns in high-throughput mode.
module tb_ascon_rc_add;
  import ascon_pkg::*;
  localparam int D = 2, PAR = 22;
  col_t [PAR-1:0] ci, o0, o1;
  logic [5:0] g;
  logic ht;
  logic [3:0] r;
  int checks = 0, failures = 0;
  ascon_rc_add #(.D(D), .PAR(PAR), .K(0)) a0 (.cols_in (ci), .group (g), .mode_ht (ht), .round_idx (r), .cols_out (o0));
  ascon_rc_add #(.D(D), .PAR(PAR), .K(1)) a1 (.cols_in (ci), .group (g), .mode_ht (ht), .round_idx (r), .cols_out (o1));

  // constants of the Ascon specification, rounds 0..11
  localparam logic [7:0] RC [12] = '{8'hf0, 8'he1, 8'hd2, 8'hc3, 8'hb4, 8'ha5,
                                     8'h96, 8'h87, 8'h78, 8'h69, 8'h5a, 8'h4b};
  initial begin
    for (int rr = 0; rr < 12; rr++) for (int m = 0; m < 2; m++) for (int gg = 0; gg < 3; gg++) begin
      r = 4'(rr); ht = m[0]; g = 6'(gg);
      for (int p = 0; p < PAR; p++) ci[p] = 5'($urandom);
      #1;
      for (int p = 0; p < PAR; p++) begin
        int c0, c1;
        col_t e0, e1;
        c0 = ht ? (gg * PAR + p) * 3 : gg * PAR + p;
        c1 = ht ? (gg * PAR + p) * 3 + 1 : gg * PAR + p;
        e0 = ci[p]; e1 = ci[p];
        if (c0 < 8) e0[2] ^= RC[rr][c0];
        if (ht && c1 < 8) e1[2] ^= RC[rr][c1];
        checks += 2;
        if (o0[p] !== e0) begin failures++; $display("k0 r%0d m%0d g%0d p%0d", rr, m, gg, p); end
        if (o1[p] !== e1) begin failures++; $display("k1 r%0d m%0d g%0d p%0d", rr, m, gg, p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

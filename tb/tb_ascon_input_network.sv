// tb_ascon_input_network: random states; checks the columns picked by the
// domain-0 and domain-2 networks in both modes for every group, including
// groups that run past column 63 (which must read as zero).
module tb_ascon_input_network;
  import ascon_pkg::*;
  localparam int D = 2, PAR = 22;
  state_t s;
  logic [5:0] g;
  logic ht;
  col_t [PAR-1:0] c0, c2;
  int checks = 0, failures = 0;
  ascon_input_network #(.D(D), .PAR(PAR), .K(0)) n0 (.state (s), .group (g), .mode_ht (ht), .cols (c0));
  ascon_input_network #(.D(D), .PAR(PAR), .K(2)) n2 (.state (s), .group (g), .mode_ht (ht), .cols (c2));

  function automatic col_t column(input state_t st, input int c);
    col_t v;
    if (c >= 64) return '0;
    for (int i = 0; i < 5; i++) v[i] = st[i][c];
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom};
      for (int m = 0; m < 2; m++) begin
        ht = m[0];
        for (int gg = 0; gg < 3; gg++) begin
          g = 6'(gg);
          #1;
          for (int p = 0; p < PAR; p++) begin
            int e0, e2;
            e0 = ht ? (gg * PAR + p) * 3 : gg * PAR + p;
            e2 = ht ? (gg * PAR + p) * 3 + 2 : gg * PAR + p;
            checks += 2;
            if (c0[p] !== column(s, e0)) begin failures++; $display("k0 m%0d g%0d p%0d", m, gg, p); end
            if (c2[p] !== column(s, e2)) begin failures++; $display("k2 m%0d g%0d p%0d", m, gg, p); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

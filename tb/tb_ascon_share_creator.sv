// tb_ascon_share_creator: random columns and random bits; the shares must
// XOR to the column and shares 1..D must be the supplied random bits.
module tb_ascon_share_creator;
  import ascon_pkg::*;
  localparam int D = 2, PAR = 22;
  col_t [PAR-1:0] cols;
  logic [PAR*5*D-1:0] rnd;
  col_t [D:0][PAR-1:0] sh;
  int checks = 0, failures = 0;
  ascon_share_creator #(.D(D), .PAR(PAR)) dut (.cols (cols), .rnd (rnd), .shares (sh));
  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < PAR; p++) cols[p] = 5'($urandom);
      for (int i = 0; i < PAR * 5 * D; i++) rnd[i] = 1'($urandom);
      #1;
      for (int p = 0; p < PAR; p++) begin
        checks += 1 + D;
        if ((sh[0][p] ^ sh[1][p] ^ sh[2][p]) !== cols[p]) failures++;
        for (int j = 1; j <= D; j++)
          if (sh[j][p] !== rnd[(p * D + j - 1) * 5 +: 5]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

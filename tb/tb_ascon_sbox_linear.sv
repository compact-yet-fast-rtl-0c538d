// tb_ascon_sbox_linear: for all 32 inputs, the linear layer followed by a
// behavioural chi and affine layer must give the Ascon S-box table value.
module tb_ascon_sbox_linear;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;
  localparam int PAR = 4;
  col_t [PAR-1:0] ci, co;
  int checks = 0, failures = 0;
  ascon_sbox_linear #(.PAR(PAR)) dut (.cols_in (ci), .cols_out (co));

  function automatic col_t chi_aff(input col_t x);
    col_t y;
    for (int i = 0; i < 5; i++) y[i] = x[i] ^ (~x[(i + 1) % 5] & x[(i + 2) % 5]);
    y[1] ^= y[0]; y[0] ^= y[4]; y[3] ^= y[2]; y[2] = ~y[2];
    return y;
  endfunction

  initial begin
    for (int v = 0; v < 32; v += PAR) begin
      for (int p = 0; p < PAR; p++) ci[p] = col_t'(v + p);
      #1;
      for (int p = 0; p < PAR; p++) begin
        checks++;
        if (chi_aff(co[p]) !== sbox_col(col_t'(v + p))) begin
          failures++;
          $display("mismatch in=%0d", v + p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

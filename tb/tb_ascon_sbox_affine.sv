// tb_ascon_sbox_affine: for all 32 inputs, a behavioural linear and chi
// layer followed by the affine layer must give the Ascon S-box table value
// (inv=1), and the same value with x2 inverted when inv=0.
module tb_ascon_sbox_affine;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;
  localparam int PAR = 4;
  col_t [PAR-1:0] ci, co;
  logic inv;
  int checks = 0, failures = 0;
  ascon_sbox_affine #(.PAR(PAR)) dut (.cols_in (ci), .inv (inv), .cols_out (co));

  function automatic col_t lin_chi(input col_t x);
    col_t y, z;
    y = x;
    y[0] ^= y[4]; y[4] ^= y[3]; y[2] ^= y[1];
    for (int i = 0; i < 5; i++) z[i] = y[i] ^ (~y[(i + 1) % 5] & y[(i + 2) % 5]);
    return z;
  endfunction

  initial begin
    for (int m = 0; m < 2; m++) begin
      inv = (m == 0);
      for (int v = 0; v < 32; v += PAR) begin
        for (int p = 0; p < PAR; p++) ci[p] = lin_chi(col_t'(v + p));
        #1;
        for (int p = 0; p < PAR; p++) begin
          checks++;
          if (co[p] !== (sbox_col(col_t'(v + p)) ^ (inv ? 5'b0 : 5'b00100))) begin
            failures++;
            $display("mismatch in=%0d inv=%0b", v + p, inv);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

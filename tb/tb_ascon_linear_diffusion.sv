// tb_ascon_linear_diffusion: drives random states and single-bit states
// through the linear diffusion layer and compares with the reference model.
module tb_ascon_linear_diffusion;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;
  state_t si, so;
  int checks = 0, failures = 0;
  ascon_linear_diffusion dut (.s_in (si), .s_out (so));
  initial begin
    for (int t = 0; t < 400; t++) begin
      if (t < 320) begin si = '0; si[t / 64][t % 64] = 1'b1; end
      else for (int i = 0; i < 5; i++) si[i] = {$urandom, $urandom};
      #1;
      checks++;
      if (so !== state_t'(ldl(rstate_t'(si)))) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_ascon_state_shift_reg: shifts numbered groups in and checks that,
// after n shifts, group g sits at slot L-(n-g)*PAR+p of every domain, and
// that the register holds while shift is low.
module tb_ascon_state_shift_reg;
  import ascon_pkg::*;
  localparam int D = 2, PAR = 22, L = 44;
  logic clk = 0, shift = 0;
  col_t [D:0][PAR-1:0] din;
  col_t [D:0][L-1:0] q;
  col_t hist [8][D+1][PAR];
  int checks = 0, failures = 0;
  ascon_state_shift_reg #(.D(D), .PAR(PAR)) dut (.clk, .shift, .din, .q);
  always #5 clk = ~clk;
  initial begin
    for (int n = 0; n < 6; n++) begin
      for (int k = 0; k <= D; k++) for (int p = 0; p < PAR; p++) begin
        din[k][p] = 5'($urandom); hist[n][k][p] = din[k][p];
      end
      shift = 1; @(posedge clk); #1 shift = 0;
      din = '0; @(posedge clk); #1;   // hold cycle
      for (int g = 0; g <= n; g++) if (n - g < L / PAR)
        for (int k = 0; k <= D; k++) for (int p = 0; p < PAR; p++) begin
          checks++;
          if (q[k][L - (n - g + 1) * PAR + p] !== hist[g][k][p]) begin failures++; $display("n%0d g%0d k%0d p%0d", n, g, k, p); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

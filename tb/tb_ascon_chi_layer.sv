// tb_ascon_chi_layer: random shares through the masked path must recombine
// to chi of the recombined input one cycle later; in high-throughput mode
// every domain must hold chi of its own column, combinationally.
module tb_ascon_chi_layer;
  import ascon_pkg::*;
  localparam int D = 2, PAR = 22, NZ = 3;
  logic clk = 0, en = 0, ht = 0;
  col_t [D:0][PAR-1:0] sh, q, qh;
  logic [PAR*5*NZ-1:0] z;
  int checks = 0, failures = 0;
  ascon_chi_layer #(.D(D), .PAR(PAR)) dut (.clk, .en, .mode_ht (ht), .sh, .z, .q, .q_ht (qh));
  always #5 clk = ~clk;

  function automatic col_t chi(input col_t x);
    col_t y;
    for (int i = 0; i < 5; i++) y[i] = x[i] ^ (~x[(i + 1) % 5] & x[(i + 2) % 5]);
    return y;
  endfunction

  initial begin
    col_t [PAR-1:0] expm;
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k <= D; k++) for (int p = 0; p < PAR; p++) sh[k][p] = 5'($urandom);
      for (int i = 0; i < PAR * 5 * NZ; i++) z[i] = 1'($urandom);
      ht = 1; en = 0; #1;
      for (int k = 0; k <= D; k++) for (int p = 0; p < PAR; p++) begin
        checks++;
        if (qh[k][p] !== chi(sh[k][p])) begin failures++; $display("ht t%0d k%0d p%0d", t, k, p); end
      end
      ht = 0; en = 1;
      for (int p = 0; p < PAR; p++) expm[p] = chi(sh[0][p] ^ sh[1][p] ^ sh[2][p]);
      @(posedge clk); #1;
      for (int p = 0; p < PAR; p++) begin
        checks++;
        if ((q[0][p] ^ q[1][p] ^ q[2][p]) !== expm[p]) begin failures++; $display("masked t%0d p%0d", t, p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_ascon_masked_top_par_sweep: runs the whole core at parallelism below
// the maximum, the trade-off between S-box count and throughput: d=2 with
// PAR = 1, 4 and 11, and d=1 with PAR = 8. Each harness checks the known
// answer, random messages against the reference model, and the round
// latencies ceil(64/PAR)+2 (masked) and ceil(64/(PAR*(d+1)))+1
// (high-throughput), e.g. 66 and 23 cycles at d=2, PAR=1.
module tb_ascon_masked_top_par_sweep;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] dn;
  int c [4], f [4];
  int checks = 0, failures = 0;
  ascon_top_harness #(.D(2), .PAR(1))  h0 (.clk, .rst_n, .done (dn[0]), .checks (c[0]), .failures (f[0]));
  ascon_top_harness #(.D(2), .PAR(4))  h1 (.clk, .rst_n, .done (dn[1]), .checks (c[1]), .failures (f[1]));
  ascon_top_harness #(.D(2), .PAR(11)) h2 (.clk, .rst_n, .done (dn[2]), .checks (c[2]), .failures (f[2]));
  ascon_top_harness #(.D(1), .PAR(8))  h3 (.clk, .rst_n, .done (dn[3]), .checks (c[3]), .failures (f[3]));
  task automatic report(input int extra);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3] + extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (&dn);
    report(0);
  end
  initial begin
    repeat (200000) @(posedge clk);
    report(1);
  end
endmodule

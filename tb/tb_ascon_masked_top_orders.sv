// tb_ascon_masked_top_orders: runs the whole core at the other masking
// orders evaluated for this architecture, each at its maximum parallelism
// ceil(64/(d+1)): d=1 with 32 S-boxes, d=3 with 16, d=5 with 11. Each
// harness checks the known answer, random messages against the reference
// model, and the masked and high-throughput permutation latencies
// (high-throughput rounds take 2 cycles at every order).
module tb_ascon_masked_top_orders;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic d1, d3, d5;
  int c1, c3, c5, f1, f3, f5;
  int checks = 0, failures = 0;
  ascon_top_harness #(.D(1), .PAR(32)) h1 (.clk, .rst_n, .done (d1), .checks (c1), .failures (f1));
  ascon_top_harness #(.D(3), .PAR(16)) h3 (.clk, .rst_n, .done (d3), .checks (c3), .failures (f3));
  ascon_top_harness #(.D(5), .PAR(11)) h5 (.clk, .rst_n, .done (d5), .checks (c5), .failures (f5));
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (d1 && d3 && d5);
    checks = c1 + c3 + c5; failures = f1 + f3 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    checks = c1 + c3 + c5; failures = f1 + f3 + f5 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

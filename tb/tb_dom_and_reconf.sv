// tb_dom_and_reconf: second- and first-order gadgets. Masked output: the
// XOR of the registered shares must equal c ^ (a & b) of the unshared
// values one cycle after en, must hold while en is low, and a random bit
// must reach the two shares of its pair. High-throughput output: each
// domain must give its own c ^ (a & b) without a clock.
module tb_dom_and_reconf;
  logic clk = 0, en = 0;
  logic [2:0] a, b, c, q, qh;
  logic [2:0] z;
  logic [1:0] a1, b1, c1, q1, qh1;
  logic       z1;
  int checks = 0, failures = 0;
  dom_and_reconf #(.D(2)) dut (.clk, .en, .a (a), .b (b), .c (c), .z (z), .q (q), .q_ht (qh));
  dom_and_reconf #(.D(1)) dut1 (.clk, .en, .a (a1), .b (b1), .c (c1), .z (z1), .q (q1), .q_ht (qh1));
  always #5 clk = ~clk;

  initial begin
    logic exp, exp1, held;
    logic [2:0] qsave;
    for (int t = 0; t < 300; t++) begin
      {a, b, c, z} = 12'($urandom);
      {a1, b1, c1, z1} = 7'($urandom);
      en = 1;
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (qh[k] !== (c[k] ^ (a[k] & b[k]))) failures++;
      end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (qh1[k] !== (c1[k] ^ (a1[k] & b1[k]))) failures++;
      end
      exp  = (^c) ^ ((^a) & (^b));
      exp1 = (^c1) ^ ((^a1) & (^b1));
      @(posedge clk); #1;
      checks += 2;
      if ((^q) !== exp)   begin failures++; $display("d2 masked t=%0d", t); end
      if ((^q1) !== exp1) begin failures++; $display("d1 masked t=%0d", t); end
      // hold with en low
      en = 0; qsave = q; held = 1;
      {a, b, c, z} = 12'($urandom);
      @(posedge clk); #1;
      checks++;
      if (q !== qsave) failures++;
    end
    // a resharing bit must change both shares of its pair and nothing else
    for (int i = 0; i < 3; i++) begin
      logic [2:0] q0;
      {a, b, c} = 9'h1ff; z = '0; en = 1;
      @(posedge clk); #1 q0 = q;
      z = 3'(1 << i);
      @(posedge clk); #1;
      checks++;
      if ($countones(q ^ q0) != 2 || (^q) !== (^q0)) begin failures++; $display("z bit %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_ascon_rng: after reset and after a seed load, the output must follow
// a behavioural xorshift64 model of each generator, hold when en is low,
// and not repeat over the run.
module tb_ascon_rng;
  localparam int W = 150, NG = 3;
  localparam logic [63:0] GOLDEN = 64'h9E3779B97F4A7C15;
  logic clk = 0, rst_n = 0, seed_load = 0, en = 0;
  logic [63:0] seed;
  logic [W-1:0] rnd, prev;
  logic [NG-1:0][63:0] m;
  int checks = 0, failures = 0;
  ascon_rng #(.W(W)) dut (.clk, .rst_n, .seed_load, .seed, .en, .rnd);
  always #5 clk = ~clk;

  function automatic logic [63:0] xs(input logic [63:0] x);
    logic [63:0] y;
    y = x ^ (x << 13); y = y ^ (y >> 7); y = y ^ (y << 17);
    return y;
  endfunction

  task automatic cmp(string what);
    checks++;
    if (rnd !== W'(m)) begin failures++; $display("mismatch %s", what); end
  endtask

  initial begin
    seed = 64'h0123456789abcdef;
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < NG; i++) m[i] = GOLDEN * 64'(i + 1);
    cmp("reset");
    en = 1;
    for (int t = 0; t < 20; t++) begin
      @(posedge clk); #1;
      for (int i = 0; i < NG; i++) m[i] = xs(m[i]);
      cmp("run");
    end
    en = 0; prev = rnd;
    @(posedge clk); #1; checks++; if (rnd !== prev) failures++;
    seed_load = 1; @(posedge clk); #1 seed_load = 0;
    for (int i = 0; i < NG; i++) m[i] = seed ^ (GOLDEN * 64'(i + 1));
    cmp("seed");
    en = 1;
    for (int t = 0; t < 50; t++) begin
      prev = rnd;
      @(posedge clk); #1;
      for (int i = 0; i < NG; i++) m[i] = xs(m[i]);
      cmp("run2");
      checks++; if (rnd === prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

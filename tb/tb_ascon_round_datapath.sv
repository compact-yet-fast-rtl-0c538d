// tb_ascon_round_datapath: loads random states and runs single rounds and
// whole permutations, back to back, in masked and high-throughput mode,
// with fresh random bits every cycle. Every result is compared with the
// reference round function, and the cycle counts with the expected
// latencies: at D=2, PAR=22 a masked round takes 5 cycles and a
// high-throughput round 2; a second instance at D=1, PAR=5 (13 and 7
// groups per round, 15 and 8 cycles) exercises the shift register in
// both modes.
module tb_ascon_round_datapath;
  import ascon_pkg::*;
  import ascon_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // instance A: defaults
  localparam int RWA = 22 * 5 * 2 + 22 * 5 * 3;
  logic ld_a = 0, rs_a = 0, ht_a = 0, done_a, busy_a;
  logic [3:0] ri_a = 0;
  state_t wd_a, sq_a;
  logic [RWA-1:0] rnd_a;
  ascon_round_datapath dut_a (.clk, .rst_n, .st_load (ld_a), .st_wdata (wd_a), .round_start (rs_a),
    .round_idx (ri_a), .mode_ht (ht_a), .rnd (rnd_a), .state_q (sq_a), .round_done (done_a), .busy (busy_a));

  // instance B: D=1, PAR=5
  localparam int RWB = 5 * 5 * 1 + 5 * 5 * 1;
  logic ld_b = 0, rs_b = 0, ht_b = 0, done_b, busy_b;
  logic [3:0] ri_b = 0;
  state_t wd_b, sq_b;
  logic [RWB-1:0] rnd_b;
  ascon_round_datapath #(.D(1), .PAR(5)) dut_b (.clk, .rst_n, .st_load (ld_b), .st_wdata (wd_b), .round_start (rs_b),
    .round_idx (ri_b), .mode_ht (ht_b), .rnd (rnd_b), .state_q (sq_b), .round_done (done_b), .busy (busy_b));

  always @(negedge clk) begin
    for (int i = 0; i < RWA; i += 32) rnd_a[i +: 32] = $urandom;
    for (int i = 0; i < RWB; i++) rnd_b[i] = 1'($urandom);
  end

  function automatic state_t rand_state();
    state_t s; for (int i = 0; i < 5; i++) s[i] = {$urandom, $urandom}; return s;
  endfunction

  // run nr rounds (last nr of 12) on instance A or B; return cycles taken
  task automatic run_perm(input bit inst_b, input bit ht, input int nr, input state_t s0, output int cyc);
    state_t exp;
    exp = state_t'(perm(rstate_t'(s0), nr));
    @(negedge clk);
    if (inst_b) begin ld_b = 1; wd_b = s0; end else begin ld_a = 1; wd_a = s0; end
    @(negedge clk);
    ld_a = 0; ld_b = 0;
    cyc = 0;
    for (int r = 12 - nr; r < 12; r++) begin
      if (inst_b) begin rs_b = 1; ri_b = 4'(r); ht_b = ht; end
      else begin rs_a = 1; ri_a = 4'(r); ht_a = ht; end
      @(negedge clk); cyc++;
      rs_a = 0; rs_b = 0;
      while (!(inst_b ? done_b : done_a)) begin @(negedge clk); cyc++; end
    end
    checks++;
    if ((inst_b ? sq_b : sq_a) !== exp) begin
      failures++; $display("state mismatch inst_b=%0b ht=%0b nr=%0d", inst_b, ht, nr);
    end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int m = 0; m < 2; m++) begin
        // single round with a random index
        run_perm(0, m[0], 1, rand_state(), cyc);
        checks++; if (cyc != (m ? 2 : 5)) begin failures++; $display("A round cycles %0d ht=%0d", cyc, m); end
        run_perm(1, m[0], 1, rand_state(), cyc);
        checks++; if (cyc != (m ? 8 : 15)) begin failures++; $display("B round cycles %0d ht=%0d", cyc, m); end
      end
      // whole permutations: p^a masked, p^b high-throughput
      run_perm(0, 0, 12, rand_state(), cyc);
      checks++; if (cyc != 60) begin failures++; $display("A p12 masked cycles %0d", cyc); end
      run_perm(0, 1, 8, rand_state(), cyc);
      checks++; if (cyc != 16) begin failures++; $display("A p8 ht cycles %0d", cyc); end
      run_perm(1, 0, 12, rand_state(), cyc);
      run_perm(1, 1, 8, rand_state(), cyc);
      run_perm(0, 1, 12, rand_state(), cyc);
      run_perm(0, 0, 8, rand_state(), cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

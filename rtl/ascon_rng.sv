// ascon_rng: source of the fresh random bits that share creation and DOM
// resharing consume, W bits per cycle.
//
// A bank of ceil(W/64) xorshift64 generators (x ^= x<<13; x ^= x>>7;
// x ^= x<<17) advances every cycle that en is high. seed_load loads
// generator i with seed ^ (i+1)*0x9E3779B97F4A7C15, forced non-zero. This is
// a pseudo-random generator standing in for the RNG of the architecture; a
// product would feed or reseed it from a true entropy source. Synchronous
// active-low reset to a fixed non-zero state.
module ascon_rng #(
  parameter int unsigned W = 550
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [63:0]  seed,
  input  logic         en,
  output logic [W-1:0] rnd
);
  localparam int unsigned NG = (W + 63) / 64;
  localparam logic [63:0] GOLDEN = 64'h9E3779B97F4A7C15;

  logic [NG-1:0][63:0] st_q;

  function automatic logic [63:0] xs64(input logic [63:0] x);
    logic [63:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 7);
    y = y ^ (y << 17);
    return y;
  endfunction

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < NG; i++) begin
      logic [63:0] s;
      s = seed ^ (GOLDEN * 64'(i + 1));
      if (!rst_n)         st_q[i] <= GOLDEN * 64'(i + 1);
      else if (seed_load) st_q[i] <= (s == '0) ? GOLDEN : s;
      else if (en)        st_q[i] <= xs64(st_q[i]);
    end
  end

  assign rnd = W'(st_q);
endmodule

// ascon_pkg: types, constants and small functions shared by the masked
// Ascon core.
//
// The 320-bit state is five 64-bit words x0..x4 (state_t[i] = x_i). A column
// is the 5-bit slice {x4[c],x3[c],x2[c],x1[c],x0[c]} at bit position c of the
// words (col_t bit i = x_i); the S-box works on one column. Column c is bit c
// of the words taken as integers, so the round constant, which the Ascon
// specification adds to x2 as an integer, lands in columns 0..7.
// Round constants and the IV are those of the Ascon v1.2 specification
// (Ascon-128a); the document itself prints neither.
package ascon_pkg;

  typedef logic [63:0]       word_t;
  typedef logic [4:0][63:0]  state_t;   // [i] = x_i
  typedef logic [4:0]        col_t;     // bit i = x_i of one column

  localparam int unsigned NCOL = 64;    // columns in the state

  // IV of Ascon-128a v1.2: k=128, r=128, a=12, b=8
  localparam word_t IV_ASCON128A = 64'h80800c0800000000;

  // Round constant of round r, r = 0..11 in the 12-round numbering
  // (p^b with 8 rounds uses r = 4..11).
  function automatic logic [7:0] round_const(input logic [3:0] r);
    logic [3:0] hi;
    hi = 4'hf - r;
    return {hi, r};
  endfunction

  function automatic word_t rotr(input word_t x, input int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic col_t get_col(input state_t s, input logic [5:0] c);
    col_t v;
    for (int i = 0; i < 5; i++) v[i] = s[i][c];
    return v;
  endfunction

  // Number of column groups a round takes when n columns are handled
  // per cycle.
  function automatic int unsigned ngroups(input int unsigned n);
    return (NCOL + n - 1) / n;
  endfunction

  // Column that S-box p of domain k handles in column group g. Masked mode:
  // all domains see column g*PAR+p (as shares). High-throughput mode: the
  // D+1 domains of S-box p take D+1 neighbouring columns, domain k column
  // (g*PAR+p)*(D+1)+k. Results >= 64 mean "no column" (padding).
  function automatic int unsigned col_index(input int unsigned d, input int unsigned par,
                                            input int unsigned k, input int unsigned g,
                                            input int unsigned p, input logic ht);
    return ht ? (g * par + p) * (d + 1) + k : g * par + p;
  endfunction

endpackage

// Reference model for the testbenches: the fifth-order M-sequence worked out
// from its recurrence, and the pattern number the response collector should
// flag for a given neighbourhood.
package prt_tb_pkg;

  localparam int N = 31;

  // m[0..30] for characteristic polynomial taps c4..c0, with m[0..4] = seed
  // bits 0..4: m[k+5] = sum over j of c_j * m[k+j] (mod 2).
  function automatic logic [30:0] mseq(input logic [4:0] taps, input logic [4:0] seed);
    logic [34:0] m;
    m = '0;
    for (int k = 0; k < 5; k++) m[k] = seed[k];
    for (int k = 0; k < 30; k++) begin
      logic b;
      b = 1'b0;
      for (int j = 0; j < 5; j++) if (taps[j]) b ^= m[k+j];
      m[k+5] = b;
    end
    return m[30:0];
  endfunction

  function automatic int modn(input int x);
    int r;
    r = x % N;
    return (r < 0) ? r + N : r;
  endfunction

  // Neighbourhood {N, W, B, E, S} around a cell whose index is i.
  function automatic logic [4:0] nbr(input logic [30:0] m, input int i, input int lag);
    return {m[modn(i - lag)], m[modn(i - 1)], m[modn(i)], m[modn(i + 1)], m[modn(i + lag)]};
  endfunction

  // Pattern number (1..32) of neighbourhood p: 1 for all-zero, i+2 for the
  // index i whose neighbourhood it is; 0 if it never occurs (unusable lag).
  function automatic int pat_number(input logic [30:0] m, input int lag, input logic [4:0] p);
    if (p == 5'b0) return 1;
    for (int i = 0; i < N; i++) if (nbr(m, i, lag) == p) return i + 2;
    return 0;
  endfunction

endpackage

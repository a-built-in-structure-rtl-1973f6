// Shared constants, types and timing functions of the pseudorandom RAM test
// structure.
//
// The test data is a fifth-order M-sequence (period n = 2^5 - 1 = 31). Each
// row r of a bit-oriented RAM with NC columns and NR rows is filled with the
// sequence delayed by r*L (L is the "lag"), so during phase p the cell at
// column c of row r holds m[(p + c + r*L) mod 31]. The test generator, the
// address counters and the response collector are all stepped by one clock,
// and the functions below give the number of extra clocks ("blocking pulses")
// that realign the generator and the collector at the end of a row (T1), at
// the end of the write pass (T2) and at the end of the read pass (T3).
//
// The formulas follow the design: T1 = L - (NC mod n), T2 = n - L1,
// T3 = n - L1 + 1 with L1 = (L*NR) mod n. Here they are reduced modulo n, a
// choice of this implementation: the values are unchanged for every table
// configuration, and a full 31-clock rotation (which is a no-op) is never
// spent.
package prt_pkg;

  localparam int unsigned M_ORDER = 5;                  // order of the M-sequence
  localparam int unsigned N_PER   = (1 << M_ORDER) - 1; // period n = 31
  localparam int unsigned N_PAT   = N_PER + 1;          // patterns per base cell = 32
  localparam int unsigned CNT_W   = M_ORDER;            // modulo (n+1) counter width

  // Phase number as printed in the collector: 1 = all-zero (clear) phase,
  // 2..32 = the 31 M-sequence phases.
  typedef logic [5:0] phase_t;

  // Controller states.
  typedef enum logic [3:0] {
    S_IDLE,    // waiting for start test
    S_CLR_WR,  // step 1: clear every cell
    S_CLR_RD,  // step 2: check every cell is cleared
    S_WR,      // step 3: write row sequences
    S_WR_T1,   // lag pulses after a written row
    S_WR_T2,   // realignment after the last written row
    S_RD,      // step 4: read and compare
    S_RD_T1,   // lag pulses after a read row
    S_RD_T3,   // initialisation for the next phase
    S_DONE     // test over
  } state_e;

  // L1 = (L * NR) mod n, the lag accumulated over the whole array.
  function automatic int unsigned calc_l1(input int unsigned nr, input int unsigned lag);
    return ((nr % N_PER) * (lag % N_PER)) % N_PER;
  endfunction

  // T1 = L - (NC mod n): lag pulses after each row.
  function automatic int unsigned calc_t1(input int unsigned nc, input int unsigned lag);
    return ((lag % N_PER) + N_PER - (nc % N_PER)) % N_PER;
  endfunction

  // T2 = n - L1: realignment after the last written row.
  function automatic int unsigned calc_t2(input int unsigned nr, input int unsigned lag);
    return (N_PER - calc_l1(nr, lag)) % N_PER;
  endfunction

  // T3 = n - L1 + 1: initialisation for the next phase after the last read row.
  function automatic int unsigned calc_t3(input int unsigned nr, input int unsigned lag);
    return (N_PER - calc_l1(nr, lag) + 1) % N_PER;
  endfunction

endpackage

// Built-in pseudorandom test structure for a bit-oriented RAM.
//
// The structure detects and diagnoses static pattern-sensitive faults in
// the five-cell neighbourhood (north, west, base, east, south) of every cell.
// Each row of the RAM is filled with a fifth-order M-sequence delayed by the
// lag L relative to the row above, so cell (r, c) holds m[i] with
// i = p + c + r*L (mod 31) in phase p. With a usable lag the neighbourhood
// (m[i-L], m[i-1], m[i], m[i+1], m[i+L]) takes all 31 non-zero patterns in
// turn, and the clear phase adds the all-zero pattern. The pattern is a
// function of i only, so the 32 patterns can be numbered and a ring
// register that turns with the sequence tracks which pattern surrounds the
// cell being read.
//
// Blocks: the monitor (controller), the test sequence generator (LFSR), the
// address generation logic (row and column counters), the comparator, the
// test response collector (32-bit register with a 31-bit ring) and the
// modulo-32 blocking-pulse counter. The RAM itself is outside: its port is
// brought out (one access per clock, read data returned combinationally in
// the same clock, which is this implementation's assumption).
//
// Parameters: NC x NR is the RAM geometry, LAG the lag L, TAPS the
// characteristic polynomial (c4..c0) and SEED the generator start state.
// The defaults (1024 x 1024, L = 2, X^5+X^4+X^2+X+1) are one of the
// configurations the lag table lists: 1024 mod 31 = 1 needs L = 2, which
// gives T1 = 1, T2 = 29 and T3 = 30, and (1024*2) mod 31 = L as the table
// assumes.
//
// Result: trc[k] = 1 means a read failed while pattern k surrounded the
// cell; trc[1] is the all-zero pattern. err pulses with the failing address
// and phase for a detailed diagnosis. The result is valid while test_over is
// high; it can also be flushed out serially on trc_so (pattern 1 first, one
// bit per clock with trc_flush high, 32 clocks restore it).
module prt_bist_top
  import prt_pkg::*;
#(
  parameter int unsigned NC   = 1024,
  parameter int unsigned NR   = 1024,
  parameter int unsigned LAG  = 2,
  parameter logic [4:0]  TAPS = 5'b10111,
  parameter logic [4:0]  SEED = 5'b00001,
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_test,
  output logic          test_over,
  output logic [32:1]   trc,        // fault flag per pattern number
  input  logic          trc_flush,  // after the test: shift the result out
  output logic          trc_so,     // serial result, pattern 1 first
  output phase_t        phase,      // current phase (1..32)
  output logic          err,        // a read failed this clock
  output logic          blocking,   // a blocking pulse is active
  output state_e        ctl_state,  // controller state, for observation
  // RAM port
  output logic          mem_en,     // access this clock
  output logic          mem_we,     // write (R/W low)
  output logic [RW-1:0] mem_row,
  output logic [CW-1:0] mem_col,
  output logic          mem_wdata,
  input  logic          mem_rdata
);

  logic col_last, row_last;
  logic blk_load, blk_busy, blk_last;
  logic [CNT_W-1:0] blk_preset;
  logic agl_clear, agl_en, tsg_init, step, trc_clear, zero_phase;
  logic cmp_en, mem_rd, data_zero;
  logic m_bit, test_bit, e;

  prt_monitor #(.NC(NC), .NR(NR), .LAG(LAG)) u_monitor (
    .clk, .rst_n, .start_test,
    .col_last, .row_last,
    .blk_last, .blk_load, .blk_preset,
    .agl_clear, .agl_en, .tsg_init, .step, .trc_clear, .zero_phase,
    .cmp_en, .mem_en, .mem_rd, .data_zero, .blocking,
    .state(ctl_state), .phase, .test_over
  );

  prt_blk_counter #(.W(CNT_W)) u_blk (
    .clk, .rst_n, .load(blk_load), .preset(blk_preset),
    .busy(blk_busy), .last(blk_last)
  );

  prt_tsg #(.TAPS(TAPS), .SEED(SEED)) u_tsg (
    .clk, .rst_n, .init(tsg_init), .step, .m(m_bit), .state()
  );

  prt_agl #(.NC(NC), .NR(NR)) u_agl (
    .clk, .rst_n, .clear(agl_clear), .en(agl_en),
    .col(mem_col), .row(mem_row), .col_last, .row_last
  );

  always_comb begin
    test_bit = data_zero ? 1'b0 : m_bit;
  end

  prt_comparator #(.W(1)) u_cmp (
    .rdata(mem_rdata), .expected(test_bit), .en(cmp_en), .e
  );

  prt_trc u_trc (
    .clk, .rst_n, .clear(trc_clear), .zero_phase, .shift(step),
    .e, .rd(mem_rd), .flush(trc_flush & test_over), .q(trc), .so(trc_so)
  );

  assign mem_we    = mem_en & ~mem_rd;
  assign mem_wdata = test_bit;
  assign err       = e & mem_rd;

`ifndef SYNTHESIS
  // Blocking pulses come only from the counter, and the RAM is never
  // accessed while they are active.
  a_block_matches_counter: assert property (@(posedge clk) disable iff (!rst_n)
                                            blocking |-> blk_busy);
  a_no_access_when_blocked: assert property (@(posedge clk) disable iff (!rst_n)
                                             blocking |-> !mem_en);
`endif

endmodule

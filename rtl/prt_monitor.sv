// Monitor: the controller of the built-in test. On start_test it runs the
// whole pseudorandom test and raises test_over when the response collector
// holds the result.
//
// Sequence (one RAM access per clock, no idle clocks between steps):
//   1. clear every cell (write 0), 2. read every cell and check it is 0
//      (phase 1, the all-zero pattern);
//   3./4. phases 2..32: write every row with the test sequence, then read
//      and compare every row. The generator (TSG) and the collector (TRC)
//      step once per access. After each row, T1 = L - (NC mod 31) blocking
//      clocks step TSG and TRC while the address counters, the comparator
//      and the RAM strobe are held: this applies the lag L between rows.
//      After the last written row T2 = 31 - L1 blocking clocks bring TSG and
//      TRC back to the start of the phase; after the last read row
//      T3 = 31 - L1 + 1 blocking clocks leave them one step further, at the
//      start of the next phase (L1 = L*NR mod 31).
// The blocking pulses come from a modulo-32 counter preset to 32 - T
// (prt_blk_counter); the controller leaves a blocking state on the
// counter's last pulse.
//
// The steps, the blocking pulses, their counts and the counter preset
// follow the design. The state encoding, the handshake (a one-clock
// start_test pulse or level, test_over held until the next start) and the
// absence of idle clocks are this implementation's choices.
//
// Test length from the clock that samples start_test to the first clock
// with test_over high: 1 + 2*NR*NC + 31*(2*NR*(NC+T1) + T2 + T3) clocks.
module prt_monitor
  import prt_pkg::*;
#(
  parameter int unsigned NC  = 1024,  // cells per row
  parameter int unsigned NR  = 1024,  // rows
  parameter int unsigned LAG = 2      // lag L between row sequences
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_test,
  // address generation logic status
  input  logic         col_last,
  input  logic         row_last,
  // blocking-pulse counter
  input  logic         blk_last,
  output logic         blk_load,
  output logic [CNT_W-1:0] blk_preset,
  // control of the other test modules
  output logic         agl_clear,   // restart the address counters
  output logic         agl_en,      // advance the address
  output logic         tsg_init,    // restart the test sequence at m[0]
  output logic         step,        // step TSG and turn the TRC ring
  output logic         trc_clear,   // empty the response collector
  output logic         zero_phase,  // phase 1 (all-zero pattern)
  output logic         cmp_en,      // comparator enabled
  output logic         mem_en,      // RAM access this clock
  output logic         mem_rd,      // R/W: 1 = read, 0 = write
  output logic         data_zero,   // write/expect 0 instead of the sequence
  output logic         blocking,    // a blocking pulse is active
  output state_e       state,
  output phase_t       phase,       // 1 = clear phase, 2..32 = M-sequence phases
  output logic         test_over
);

  localparam int unsigned T1 = calc_t1(NC, LAG);
  localparam int unsigned T2 = calc_t2(NR, LAG);
  localparam int unsigned T3 = calc_t3(NR, LAG);

  localparam logic [CNT_W-1:0] PRE_T1 = CNT_W'(N_PAT - T1);
  localparam logic [CNT_W-1:0] PRE_T2 = CNT_W'(N_PAT - T2);
  localparam logic [CNT_W-1:0] PRE_T3 = CNT_W'(N_PAT - T3);

  state_e st, st_nx;
  phase_t ph, ph_nx;
  logic   last_row_q, last_row_nx;   // the row just finished was the last one
  logic   end_cell;                  // the current access is the last of the array

  always_comb begin
    end_cell = col_last & row_last;
  end

  always_comb begin
    st_nx       = st;
    ph_nx       = ph;
    last_row_nx = last_row_q;
    blk_load    = 1'b0;
    blk_preset  = '0;
    agl_clear   = 1'b0;
    agl_en      = 1'b0;
    tsg_init    = 1'b0;
    step        = 1'b0;
    trc_clear   = 1'b0;
    zero_phase  = 1'b0;
    cmp_en      = 1'b0;
    mem_en      = 1'b0;
    mem_rd      = 1'b0;
    data_zero   = 1'b0;
    blocking    = 1'b0;

    unique case (st)
      S_IDLE, S_DONE: begin
        if (start_test) begin
          agl_clear = 1'b1;
          tsg_init  = 1'b1;
          trc_clear = 1'b1;
          ph_nx     = phase_t'(1);
          st_nx     = S_CLR_WR;
        end
      end

      S_CLR_WR: begin
        mem_en    = 1'b1;
        data_zero = 1'b1;
        agl_en    = 1'b1;
        if (end_cell) st_nx = S_CLR_RD;
      end

      S_CLR_RD: begin
        mem_en     = 1'b1;
        mem_rd     = 1'b1;
        data_zero  = 1'b1;
        cmp_en     = 1'b1;
        zero_phase = 1'b1;
        agl_en     = 1'b1;
        if (end_cell) begin
          ph_nx = phase_t'(2);
          st_nx = S_WR;
        end
      end

      S_WR, S_RD: begin
        mem_en = 1'b1;
        mem_rd = (st == S_RD);
        cmp_en = (st == S_RD);
        agl_en = 1'b1;
        step   = 1'b1;
        if (col_last) begin
          last_row_nx = row_last;
          if (T1 != 0) begin
            blk_load   = 1'b1;
            blk_preset = PRE_T1;
            st_nx      = (st == S_WR) ? S_WR_T1 : S_RD_T1;
          end else if (row_last) begin
            if (st == S_WR) begin
              if (T2 != 0) begin
                blk_load   = 1'b1;
                blk_preset = PRE_T2;
                st_nx      = S_WR_T2;
              end else begin
                st_nx = S_RD;
              end
            end else begin
              if (T3 != 0) begin
                blk_load   = 1'b1;
                blk_preset = PRE_T3;
                st_nx      = S_RD_T3;
              end else if (ph == phase_t'(N_PAT)) begin
                st_nx = S_DONE;
              end else begin
                ph_nx = ph + 1'b1;
                st_nx = S_WR;
              end
            end
          end
        end
      end

      S_WR_T1, S_RD_T1: begin
        step     = 1'b1;
        blocking = 1'b1;
        if (blk_last) begin
          if (!last_row_q) begin
            st_nx = (st == S_WR_T1) ? S_WR : S_RD;
          end else if (st == S_WR_T1) begin
            if (T2 != 0) begin
              blk_load   = 1'b1;
              blk_preset = PRE_T2;
              st_nx      = S_WR_T2;
            end else begin
              st_nx = S_RD;
            end
          end else begin
            if (T3 != 0) begin
              blk_load   = 1'b1;
              blk_preset = PRE_T3;
              st_nx      = S_RD_T3;
            end else if (ph == phase_t'(N_PAT)) begin
              st_nx = S_DONE;
            end else begin
              ph_nx = ph + 1'b1;
              st_nx = S_WR;
            end
          end
        end
      end

      S_WR_T2: begin
        step     = 1'b1;
        blocking = 1'b1;
        if (blk_last) st_nx = S_RD;
      end

      S_RD_T3: begin
        step     = 1'b1;
        blocking = 1'b1;
        if (blk_last) begin
          if (ph == phase_t'(N_PAT)) begin
            st_nx = S_DONE;
          end else begin
            ph_nx = ph + 1'b1;
            st_nx = S_WR;
          end
        end
      end

      default: st_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      ph         <= '0;
      last_row_q <= 1'b0;
    end else begin
      st         <= st_nx;
      ph         <= ph_nx;
      last_row_q <= last_row_nx;
    end
  end

  assign state     = st;
  assign phase     = ph;
  assign test_over = (st == S_DONE);

  // The size limits of the design: n + 1 = 32 patterns, a lag inside one
  // period, and T values the modulo-32 counter can count.
  if (LAG == 0 || LAG >= N_PER) begin : g_bad_lag
    $error("prt_monitor: LAG must lie in 1..30");
  end
  if (NC < 1 || NR < 1) begin : g_bad_size
    $error("prt_monitor: NC and NR must be at least 1");
  end

endmodule

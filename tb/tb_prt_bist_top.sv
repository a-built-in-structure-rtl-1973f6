// End-to-end test of the built-in test structure on a 32 x 32 RAM model.
//
// Geometry 32 x 32 with lag 2 and X^5+X^4+X^2+X+1: 32 mod 31 = 1, so the lag
// table gives L = 2, T1 = 1, T2 = 29, T3 = 30, and (32*2) mod 31 = 2 = L.
// Runs: fault-free; cells stuck at 1 and at 0; several static
// pattern-sensitive faults with random neighbourhoods, including the
// all-zero one; and a restart from the finished state. Some results are
// also read out through the serial flush. For each run the
// collector is compared with the pattern numbers worked out from the
// sequence recurrence, the test length with the closed formula, and every
// read of an interior cell with the neighbourhood the lag should give.
// Each mechanism (clear phase, lag pulses, realignment pulses, next-phase
// pulses, error capture, restart, serial flush) is counted and must occur.
module tb_prt_bist_top;
  import prt_pkg::*;
  import prt_tb_pkg::*;

  localparam int unsigned NC = 32, NR = 32, LAG = 2;
  localparam logic [4:0]  TAPS = 5'b10111, SEED = 5'b00001;
  // Values printed in the lag table for NC mod 31 = 1.
  localparam int TAB_T1 = 1, TAB_T2 = 29, TAB_T3 = 30;
  localparam int CW = $clog2(NC), RW = $clog2(NR);
  localparam int EXP_CYCLES = 1 + 2*NR*NC + 31*(2*NR*(NC+TAB_T1) + TAB_T2 + TAB_T3);

  logic clk = 1'b0, rst_n = 1'b0, start_test = 1'b0;
  logic trc_flush = 1'b0, trc_so;
  logic test_over, err, blocking, mem_en, mem_we, mem_wdata, mem_rdata, interior;
  logic [32:1] trc;
  phase_t phase;
  state_e ctl_state;
  logic [RW-1:0] mem_row, f_row;
  logic [CW-1:0] mem_col, f_col;
  logic [4:0] pat;
  logic [1:0] f_kind = 2'd0;
  logic f_val = 1'b0;
  logic [3:0] f_nwes = 4'd0;

  int checks = 0, failures = 0;
  int n_clr = 0, n_t1 = 0, n_t2 = 0, n_t3 = 0, n_err = 0, n_restart = 0, n_flush = 0;
  int pat_bad = 0;
  int err_row, err_col, err_phase;
  logic [32:1] seen;
  logic [30:0] m;

  always #5 clk = ~clk;

  prt_bist_top #(.NC(NC), .NR(NR), .LAG(LAG), .TAPS(TAPS), .SEED(SEED)) dut (
    .clk, .rst_n, .start_test, .test_over, .trc, .trc_flush, .trc_so, .phase, .err, .blocking, .ctl_state,
    .mem_en, .mem_we, .mem_row, .mem_col, .mem_wdata, .mem_rdata
  );

  prt_ram_model #(.NC(NC), .NR(NR)) ram (
    .clk, .en(mem_en), .we(mem_we), .row(mem_row), .col(mem_col),
    .wdata(mem_wdata), .rdata(mem_rdata), .pat, .interior,
    .f_kind, .f_row, .f_col, .f_val, .f_nwes
  );

  // Observation at the falling edge, when all combinational values settle.
  always @(negedge clk) begin
    if (rst_n) begin
      unique case (ctl_state)
        S_CLR_WR, S_CLR_RD: n_clr++;
        S_WR_T1, S_RD_T1:   n_t1++;
        S_WR_T2:            n_t2++;
        S_RD_T3:            n_t3++;
        default: ;
      endcase
      if (mem_en && !mem_we && interior) begin
        if (phase >= 2) begin
          int i;
          i = modn(int'(phase) - 2 + int'(mem_col) + int'(mem_row) * LAG);
          if (pat != nbr(m, i, LAG)) pat_bad++;
        end else if (pat != 5'b0) pat_bad++;
        if (mem_row == 5 && mem_col == 9) seen[pat_number(m, LAG, pat)] = 1'b1;
      end
      if (err) begin
        n_err++;
        err_row = int'(mem_row); err_col = int'(mem_col); err_phase = int'(phase);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One complete test; returns the cycles from the start edge to test_over.
  task automatic run(output int cycles);
    n_err = 0;
    pat_bad = 0;
    seen = '0;
    @(negedge clk) start_test = 1'b1;
    @(negedge clk) start_test = 1'b0;
    cycles = 1;
    while (!test_over) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // Flush the result out serially and compare with the expected flags; the
  // register must be unchanged afterwards.
  task automatic flush_and_check(input logic [32:1] expv);
    logic [32:1] got;
    for (int k = 1; k <= 32; k++) begin
      @(negedge clk);
      got[k] = trc_so;
      trc_flush = 1'b1;
    end
    @(negedge clk) trc_flush = 1'b0;
    n_flush++;
    check(got == expv, $sformatf("flushed %h, expected %h", got, expv));
    check(trc == expv, "collector changed by flushing");
  endtask

  // Expected collector for a cell stuck at v: the clear phase fails if v = 1,
  // and every M-sequence phase fails where the cell should hold ~v.
  function automatic logic [32:1] exp_stuck(input logic v);
    logic [32:1] x;
    x = '0;
    x[1] = v;
    for (int i = 0; i < 31; i++) if (m[i] != v) x[i+2] = 1'b1;
    return x;
  endfunction

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, k, t1c, t2c, t3c, clrc;
    logic [32:1] expv;
    m = mseq(TAPS, SEED);
    f_row = '0; f_col = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Table values against the closed formulas.
    check(calc_t1(NC, LAG) == TAB_T1 && calc_t2(NR, LAG) == TAB_T2 &&
          calc_t3(NR, LAG) == TAB_T3, "T1/T2/T3 differ from the lag table");

    // 1. Fault-free.
    n_clr = 0; n_t1 = 0; n_t2 = 0; n_t3 = 0;
    run(cyc);
    clrc = n_clr; t1c = n_t1; t2c = n_t2; t3c = n_t3;
    check(cyc == EXP_CYCLES, $sformatf("test length %0d, expected %0d", cyc, EXP_CYCLES));
    check(trc == '0, $sformatf("fault-free collector %h", trc));
    check(n_err == 0, "error pulses on a fault-free RAM");
    check(pat_bad == 0, $sformatf("%0d reads saw a wrong neighbourhood", pat_bad));
    check(seen == '1, $sformatf("patterns seen around cell (5,9): %h", seen));
    check(clrc == 2*NR*NC, $sformatf("clear phase cycles %0d", clrc));
    check(t1c == 31*2*NR*TAB_T1, $sformatf("lag pulses %0d", t1c));
    check(t2c == 31*TAB_T2, $sformatf("realignment pulses %0d", t2c));
    check(t3c == 31*TAB_T3, $sformatf("next-phase pulses %0d", t3c));
    check(phase == phase_t'(32), "did not finish at phase 32");

    // 2. Stuck-at faults.
    f_kind = 2'd1; f_row = 3; f_col = 5; f_val = 1'b1;
    run(cyc);
    check(trc == exp_stuck(1'b1), $sformatf("stuck-at-1 collector %h, expected %h", trc, exp_stuck(1'b1)));
    flush_and_check(exp_stuck(1'b1));
    check(n_err == 16, $sformatf("stuck-at-1 error count %0d", n_err));
    f_row = 0; f_col = 0; f_val = 1'b0;
    run(cyc);
    check(trc == exp_stuck(1'b0), $sformatf("stuck-at-0 collector %h, expected %h", trc, exp_stuck(1'b0)));
    check(n_err == 16, $sformatf("stuck-at-0 error count %0d", n_err));

    // 3. Static pattern-sensitive faults. The last one is the all-zero
    // neighbourhood, which only the clear phase shows.
    for (int t = 0; t < 7; t++) begin
      logic [4:0] p;
      int r, c, pexp;
      f_kind = 2'd2;
      r = 1 + int'($urandom_range(NR - 3));
      c = 1 + int'($urandom_range(NC - 3));
      f_row = RW'(r); f_col = CW'(c);
      if (t == 6) begin
        f_val = 1'b0; f_nwes = 4'b0000;
      end else begin
        f_val = 1'($urandom); f_nwes = 4'($urandom);
        if (f_val == 1'b0 && f_nwes == 4'b0) f_nwes = 4'b0101;
      end
      p = {f_nwes[3], f_nwes[2], f_val, f_nwes[1], f_nwes[0]};
      k = pat_number(m, LAG, p);
      expv = '0;
      expv[k] = 1'b1;
      pexp = (k == 1) ? 1 : modn(k - 2 - c - r * LAG) + 2;
      run(cyc);
      check(trc == expv, $sformatf("PSF at (%0d,%0d) pattern %b: collector %h, expected %h",
                                   r, c, p, trc, expv));
      check(n_err == 1 && err_row == r && err_col == c && err_phase == pexp,
            $sformatf("PSF diagnosis: %0d errors, last at (%0d,%0d) phase %0d, expected phase %0d",
                      n_err, err_row, err_col, err_phase, pexp));
      check(cyc == EXP_CYCLES, "test length with a fault");
      if (t < 2) flush_and_check(expv);
    end

    // 4. Restart from the finished state clears the old result.
    f_kind = 2'd0;
    run(cyc);
    n_restart++;
    check(trc == '0 && n_err == 0, "restart did not clear the collector");

    check(clrc > 0, "clear phase never ran");
    check(t1c > 0, "lag pulses never occurred");
    check(t2c > 0, "realignment pulses never occurred");
    check(t3c > 0, "next-phase pulses never occurred");
    check(n_restart > 0, "restart never happened");
    check(n_flush > 0, "serial flush never happened");
    $display("mechanisms: clear=%0d T1=%0d T2=%0d T3=%0d restart=%0d flush=%0d", clrc, t1c, t2c, t3c, n_restart, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

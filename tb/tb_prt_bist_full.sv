// One complete test of the structure at its default size: a 1024 x 1024
// (1-Mbit) RAM model, lag 2, polynomial X^5+X^4+X^2+X+1. A static
// pattern-sensitive fault with a random neighbourhood is injected at a random
// interior cell. Checked: the collector flags exactly the pattern number
// worked out from the sequence recurrence; the single error pulse gives the
// faulty cell and the phase; the test takes the closed-form number of clocks
// with the lag table's T1 = 1, T2 = 29, T3 = 30; every read of an interior
// cell sees the neighbourhood the lag should give; and one observed cell
// sees all 32 patterns. Each blocking mechanism must occur.
module tb_prt_bist_full;
  import prt_pkg::*;
  import prt_tb_pkg::*;

  localparam int unsigned NC = 1024, NR = 1024, LAG = 2;
  localparam logic [4:0]  TAPS = 5'b10111, SEED = 5'b00001;
  localparam int TAB_T1 = 1, TAB_T2 = 29, TAB_T3 = 30;
  localparam int CW = $clog2(NC), RW = $clog2(NR);
  localparam longint EXP_CYCLES = 1 + 2*longint'(NR)*NC + 31*(2*longint'(NR)*(NC+TAB_T1) + TAB_T2 + TAB_T3);

  logic clk = 1'b0, rst_n = 1'b0, start_test = 1'b0;
  logic test_over, err, blocking, mem_en, mem_we, mem_wdata, mem_rdata, interior;
  logic [32:1] trc;
  phase_t phase;
  state_e ctl_state;
  logic [RW-1:0] mem_row, f_row;
  logic [CW-1:0] mem_col, f_col;
  logic [4:0] pat;
  logic [1:0] f_kind = 2'd2;
  logic f_val = 1'b0;
  logic [3:0] f_nwes = 4'd0;

  int checks = 0, failures = 0;
  longint n_t1 = 0, n_t2 = 0, n_t3 = 0, n_clr = 0, pat_bad = 0;
  int n_err = 0, err_row, err_col, err_phase;
  logic [32:1] seen = '0;
  logic [30:0] m;

  always #5 clk = ~clk;

  prt_bist_top dut (
    .clk, .rst_n, .start_test, .test_over, .trc, .trc_flush(1'b0), .trc_so(), .phase, .err, .blocking, .ctl_state,
    .mem_en, .mem_we, .mem_row, .mem_col, .mem_wdata, .mem_rdata
  );

  prt_ram_model #(.NC(NC), .NR(NR)) ram (
    .clk, .en(mem_en), .we(mem_we), .row(mem_row), .col(mem_col),
    .wdata(mem_wdata), .rdata(mem_rdata), .pat, .interior,
    .f_kind, .f_row, .f_col, .f_val, .f_nwes
  );

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
          if (pat != nbr(m, modn(int'(phase) - 2 + int'(mem_col) + int'(mem_row) * LAG), LAG)) pat_bad++;
        end else if (pat != 5'b0) pat_bad++;
        if (mem_row == 513 && mem_col == 700) seen[pat_number(m, LAG, pat)] = 1'b1;
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

  initial begin : watchdog
    repeat (EXP_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cyc;
    int r, c, k, pexp;
    logic [4:0] p;
    logic [32:1] expv;
    m = mseq(TAPS, SEED);
    r = 1 + int'($urandom_range(NR - 3));
    c = 1 + int'($urandom_range(NC - 3));
    f_row = RW'(r); f_col = CW'(c);
    f_val = 1'($urandom);
    f_nwes = 4'($urandom);
    if (f_val == 1'b0 && f_nwes == 4'b0) f_nwes = 4'b1001;
    p = {f_nwes[3], f_nwes[2], f_val, f_nwes[1], f_nwes[0]};
    k = pat_number(m, LAG, p);
    expv = '0;
    expv[k] = 1'b1;
    pexp = modn(k - 2 - c - r * LAG) + 2;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start_test = 1'b1;
    @(negedge clk) start_test = 1'b0;
    cyc = 1;
    while (!test_over) begin
      @(negedge clk);
      cyc++;
    end

    check(cyc == EXP_CYCLES, $sformatf("test length %0d, expected %0d", cyc, EXP_CYCLES));
    check(trc == expv, $sformatf("PSF at (%0d,%0d) pattern %b: collector %h, expected %h", r, c, p, trc, expv));
    check(n_err == 1 && err_row == r && err_col == c && err_phase == pexp,
          $sformatf("diagnosis: %0d errors, last at (%0d,%0d) phase %0d, expected phase %0d",
                    n_err, err_row, err_col, err_phase, pexp));
    check(pat_bad == 0, $sformatf("%0d reads saw a wrong neighbourhood", pat_bad));
    check(seen == '1, $sformatf("patterns seen around cell (513,700): %h", seen));
    check(n_clr == 2*longint'(NR)*NC, "clear phase length");
    check(n_t1 == 31*2*longint'(NR)*TAB_T1 && n_t1 > 0, $sformatf("lag pulses %0d", n_t1));
    check(n_t2 == 31*TAB_T2 && n_t2 > 0, $sformatf("realignment pulses %0d", n_t2));
    check(n_t3 == 31*TAB_T3 && n_t3 > 0, $sformatf("next-phase pulses %0d", n_t3));
    $display("cycles=%0d clear=%0d T1=%0d T2=%0d T3=%0d", cyc, n_clr, n_t1, n_t2, n_t3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

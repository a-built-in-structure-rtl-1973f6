// Harness for one line of the lag table: one polynomial, one row size
// (NC mod 31), its suitable lag and its printed T1, T2, T3. Builds the test
// structure with a RAM model of NC x 32 cells (32 rows make L*NR mod 31 = L,
// as the table assumes), then
//   1. checks the printed T values against the controller's formulas,
//   2. runs a fault-free test: test length, empty collector, and every read
//      of an interior cell must see the neighbourhood the lag gives; one
//      interior cell must see all 32 patterns (the lag is usable);
//   3. runs a test with a random static pattern-sensitive fault and checks
//      that exactly its pattern number is flagged.
module prt_table2_harness
  import prt_pkg::*;
  import prt_tb_pkg::*;
#(
  parameter logic [4:0]  TAPS = 5'b10111,
  parameter int unsigned NC = 4,
  parameter int unsigned LAG = 4,
  parameter int TAB_T1 = 0,
  parameter int TAB_T2 = 27,
  parameter int TAB_T3 = 28
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_blk
);

  localparam int unsigned NR = 32;
  localparam logic [4:0] SEED = 5'b00001;
  localparam int CW = (NC > 1) ? $clog2(NC) : 1, RW = $clog2(NR);
  localparam int EXP_CYCLES = 1 + 2*NR*NC + 31*(2*NR*(NC+TAB_T1) + TAB_T2 + TAB_T3);

  logic start_test = 1'b0;
  logic test_over, err, blocking, mem_en, mem_we, mem_wdata, mem_rdata, interior;
  logic [32:1] trc;
  phase_t phase;
  state_e ctl_state;
  logic [RW-1:0] mem_row, f_row = '0;
  logic [CW-1:0] mem_col, f_col = '0;
  logic [4:0] pat;
  logic [1:0] f_kind = 2'd0;
  logic f_val = 1'b0;
  logic [3:0] f_nwes = 4'd0;
  logic [32:1] seen;
  logic [30:0] m;
  int pat_bad;

  prt_bist_top #(.NC(NC), .NR(NR), .LAG(LAG), .TAPS(TAPS), .SEED(SEED)) dut (
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
      if (blocking) n_blk++;
      if (mem_en && !mem_we && interior) begin
        if (phase >= 2) begin
          if (pat != nbr(m, modn(int'(phase) - 2 + int'(mem_col) + int'(mem_row) * LAG), LAG)) pat_bad++;
        end else if (pat != 5'b0) pat_bad++;
        if (mem_row == 7 && mem_col == 1) seen[pat_number(m, LAG, pat)] = 1'b1;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [taps=%b NC=%0d L=%0d]: %s", TAPS, NC, LAG, what);
    end
  endtask

  task automatic run(output int cycles);
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

  initial begin
    int cyc, r, c, k;
    logic [4:0] p;
    logic [32:1] expv;
    checks = 0; failures = 0; done = 1'b0; n_blk = 0;
    m = mseq(TAPS, SEED);
    @(posedge rst_n);

    check(calc_t1(NC, LAG) == TAB_T1 && calc_t2(NR, LAG) == TAB_T2 && calc_t3(NR, LAG) == TAB_T3,
          "printed T1/T2/T3 differ from the formulas");

    run(cyc);
    check(cyc == EXP_CYCLES, $sformatf("test length %0d, expected %0d", cyc, EXP_CYCLES));
    check(trc == '0, $sformatf("fault-free collector %h", trc));
    check(pat_bad == 0, $sformatf("%0d reads saw a wrong neighbourhood", pat_bad));
    check(seen == '1, $sformatf("patterns seen around cell (7,1): %h", seen));

    r = 1 + int'($urandom_range(NR - 3));
    c = 1 + int'($urandom_range(NC - 3));
    f_kind = 2'd2; f_row = RW'(r); f_col = CW'(c);
    f_val = 1'($urandom); f_nwes = 4'($urandom);
    p = {f_nwes[3], f_nwes[2], f_val, f_nwes[1], f_nwes[0]};
    k = pat_number(m, LAG, p);
    expv = '0;
    expv[k] = 1'b1;
    run(cyc);
    check(k != 0 && trc == expv, $sformatf("PSF pattern %b: collector %h, expected %h", p, trc, expv));
    done = 1'b1;
  end

endmodule

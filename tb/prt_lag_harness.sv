// Harness for one polynomial and one lag on an 8 x 4 RAM model. Runs one
// fault-free test through the complete structure and reports whether the
// interior cell (1,3) met all 32 patterns (the lag is usable). Checks the
// test length against the closed formula, with T1, T2, T3 computed here
// from L1 = L*NR mod 31 independently of the controller, an empty
// collector, and that every interior read sees the predicted neighbourhood.
module prt_lag_harness
  import prt_pkg::*;
  import prt_tb_pkg::*;
#(
  parameter logic [4:0]  TAPS = 5'b10111,
  parameter int unsigned LAG = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output logic usable,
  output int   checks,
  output int   failures
);

  localparam int unsigned NC = 8, NR = 4;
  localparam logic [4:0] SEED = 5'b00001;
  localparam int CW = 3, RW = 2;
  localparam int L1 = (LAG * NR) % 31;
  localparam int T1 = (LAG + 31 - NC) % 31;
  localparam int T2 = (31 - L1) % 31;
  localparam int T3 = (32 - L1) % 31;
  localparam int EXP_CYCLES = 1 + 2*NR*NC + 31*(2*NR*(NC+T1) + T2 + T3);

  logic start_test = 1'b0;
  logic test_over, err, blocking, mem_en, mem_we, mem_wdata, mem_rdata, interior;
  logic [32:1] trc;
  phase_t phase;
  state_e ctl_state;
  logic [RW-1:0] mem_row;
  logic [CW-1:0] mem_col;
  logic [4:0] pat;
  logic [32:1] seen = '0;
  logic [30:0] m;
  int pat_bad = 0;

  prt_bist_top #(.NC(NC), .NR(NR), .LAG(LAG), .TAPS(TAPS), .SEED(SEED)) dut (
    .clk, .rst_n, .start_test, .test_over, .trc, .trc_flush(1'b0), .trc_so(), .phase, .err, .blocking, .ctl_state,
    .mem_en, .mem_we, .mem_row, .mem_col, .mem_wdata, .mem_rdata
  );

  prt_ram_model #(.NC(NC), .NR(NR)) ram (
    .clk, .en(mem_en), .we(mem_we), .row(mem_row), .col(mem_col),
    .wdata(mem_wdata), .rdata(mem_rdata), .pat, .interior,
    .f_kind(2'd0), .f_row('0), .f_col('0), .f_val(1'b0), .f_nwes(4'd0)
  );

  always @(negedge clk) begin
    if (rst_n && mem_en && !mem_we && interior) begin
      if (phase >= 2) begin
        if (pat != nbr(m, modn(int'(phase) - 2 + int'(mem_col) + int'(mem_row) * LAG), LAG)) pat_bad++;
      end else if (pat != 5'b0) pat_bad++;
      if (mem_row == 1 && mem_col == 3) seen[int'(pat) + 1] = 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [taps=%b L=%0d]: %s", TAPS, LAG, what);
    end
  endtask

  initial begin
    int cyc;
    checks = 0; failures = 0; done = 1'b0; usable = 1'b0;
    m = mseq(TAPS, SEED);
    @(posedge rst_n);
    @(negedge clk) start_test = 1'b1;
    @(negedge clk) start_test = 1'b0;
    cyc = 1;
    while (!test_over) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == EXP_CYCLES, $sformatf("test length %0d, expected %0d", cyc, EXP_CYCLES));
    check(trc == '0, $sformatf("fault-free collector %h", trc));
    check(pat_bad == 0, $sformatf("%0d reads saw a wrong neighbourhood", pat_bad));
    // seen[] is indexed by the 5 pattern bits + 1, so all 32 set = complete.
    usable = (seen == '1);
    done = 1'b1;
  end

endmodule

// Test harness for one controller configuration. Surrounds the monitor with
// simple behavioural address counters and a blocking-pulse counter, starts
// one test, and compares the controller state and its control outputs clock
// by clock with the sequence the test procedure prescribes:
// clear (NR*NC), check (NR*NC), then for phases 2..32 every row written
// (NC accesses, T1 lag clocks), T2 clocks, every row read (NC, T1), T3
// clocks, and finally test over. T1..T3 are given from the lag table.
module prt_monitor_harness
  import prt_pkg::*;
#(
  parameter int unsigned NC = 4,
  parameter int unsigned NR = 3,
  parameter int unsigned LAG = 7,
  parameter int T1 = 3,
  parameter int T2 = 10,
  parameter int T3 = 11
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_blk      // blocking clocks seen
);

  logic start_test = 1'b0;
  logic col_last, row_last, blk_last, blk_load;
  logic [CNT_W-1:0] blk_preset;
  logic agl_clear, agl_en, tsg_init, step, trc_clear, zero_phase, cmp_en;
  logic mem_en, mem_rd, data_zero, blocking, test_over;
  state_e state;
  phase_t phase;

  prt_monitor #(.NC(NC), .NR(NR), .LAG(LAG)) dut (
    .clk, .rst_n, .start_test, .col_last, .row_last, .blk_last, .blk_load, .blk_preset,
    .agl_clear, .agl_en, .tsg_init, .step, .trc_clear, .zero_phase, .cmp_en,
    .mem_en, .mem_rd, .data_zero, .blocking, .state, .phase, .test_over
  );

  // Behavioural address counters and blocking counter.
  int col = 0, row = 0, remaining = 0;
  assign col_last = (col == int'(NC) - 1);
  assign row_last = (row == int'(NR) - 1);
  assign blk_last = (remaining == 1);

  always @(posedge clk) begin
    if (agl_clear) begin
      col <= 0; row <= 0;
    end else if (agl_en) begin
      col <= col_last ? 0 : col + 1;
      if (col_last) row <= row_last ? 0 : row + 1;
    end
    if (blk_load) remaining <= (32 - int'(blk_preset)) % 32;
    else if (remaining > 0) remaining <= remaining - 1;
  end

  state_e exp_q[$];
  int     ph_q[$];

  task automatic push(input state_e s, input int n, input int p);
    for (int k = 0; k < n; k++) begin
      exp_q.push_back(s);
      ph_q.push_back(p);
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [NC=%0d L=%0d]: %s", NC, LAG, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0; n_blk = 0;
    push(S_CLR_WR, NR*NC, 1);
    push(S_CLR_RD, NR*NC, 1);
    for (int p = 2; p <= 32; p++) begin
      for (int r = 0; r < int'(NR); r++) begin
        push(S_WR, NC, p);
        push(S_WR_T1, T1, p);
      end
      push(S_WR_T2, T2, p);
      for (int r = 0; r < int'(NR); r++) begin
        push(S_RD, NC, p);
        push(S_RD_T1, T1, p);
      end
      push(S_RD_T3, T3, p);
    end
    push(S_DONE, 3, 32);

    @(posedge rst_n);
    @(negedge clk);
    check(state == S_IDLE && !test_over, "not idle after reset");
    start_test = 1'b1;
    @(negedge clk);
    start_test = 1'b0;
    while (exp_q.size() > 0) begin
      state_e s;
      int p;
      bit acc, blk;
      s = exp_q.pop_front();
      p = ph_q.pop_front();
      acc = (s inside {S_CLR_WR, S_CLR_RD, S_WR, S_RD});
      blk = (s inside {S_WR_T1, S_RD_T1, S_WR_T2, S_RD_T3});
      if (blk) n_blk++;
      check(state == s, $sformatf("state %s, expected %s", state.name(), s.name()));
      check(int'(phase) == p, $sformatf("phase %0d, expected %0d", phase, p));
      check(mem_en == acc && agl_en == acc && blocking == blk &&
            step == (s inside {S_WR, S_RD} || blk) &&
            mem_rd == (s inside {S_CLR_RD, S_RD}) &&
            cmp_en == (s inside {S_CLR_RD, S_RD}) &&
            zero_phase == (s == S_CLR_RD) &&
            data_zero == (s inside {S_CLR_WR, S_CLR_RD}) &&
            test_over == (s == S_DONE),
            $sformatf("control outputs in state %s", s.name()));
      @(negedge clk);
    end
    done = 1'b1;
  end

endmodule

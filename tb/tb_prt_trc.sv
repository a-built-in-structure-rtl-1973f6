// Test of the test response collector against a model that keeps the
// pattern flags by number and only tracks how far the ring has turned:
// pattern k sits at ring position ((k - 2 - turns) mod 31) + 2, and an error
// read during a shift belongs to pattern (turns mod 31) + 2. Random shifts,
// reads, writes, errors and clear-phase errors are applied, then the result
// is flushed out serially.
module tb_prt_trc;
  import prt_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, zero_phase = 1'b0, shift = 1'b0;
  logic e = 1'b0, rd = 1'b0, flush = 1'b0, so;
  logic [32:1] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prt_trc dut (.clk, .rst_n, .clear, .zero_phase, .shift, .e, .rd, .flush, .q, .so);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:1] flag, expq;
    int turns;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    flag = '0;
    turns = 0;
    for (int k = 0; k < 3000; k++) begin
      zero_phase = (k % 500) < 40;
      shift = zero_phase ? 1'b0 : ($urandom_range(4) != 0);
      rd = 1'($urandom);
      e = (zero_phase || shift) ? ($urandom_range(12) == 0) : 1'b0;
      if (k == 1700) clear = 1'b1;
      @(negedge clk);
      if (clear) begin
        flag = '0;
        turns = 0;
        clear = 1'b0;
      end else if (zero_phase) begin
        if (e && rd) flag[1] = 1'b1;
      end else if (shift) begin
        if (e && rd) flag[modn(turns) + 2] = 1'b1;
        turns++;
      end
      expq = '0;
      expq[1] = flag[1];
      for (int p = 2; p <= 32; p++)
        expq[modn(p - 2 - turns) + 2] = flag[p];
      check(q == expq, $sformatf("cycle %0d: q=%h expected %h", k, q, expq));
    end
    check(flag != '0, "no error was ever recorded");
    // Serial flush: 32 clocks give q[1], q[2], ..., q[32] and restore q.
    zero_phase = 1'b0; shift = 1'b0; e = 1'b0;
    expq = q;
    begin
      logic [32:1] got;
      for (int k = 1; k <= 32; k++) begin
        got[k] = so;
        flush = 1'b1;
        @(negedge clk);
      end
      flush = 1'b0;
      check(got == expq, $sformatf("flushed %h, expected %h", got, expq));
      check(q == expq, "register changed by a full flush");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

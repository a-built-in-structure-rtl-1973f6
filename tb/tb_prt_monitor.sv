// Test of the controller in three configurations taken from the lag table:
// X^5+X^2+1 with 4 columns (L = 7: T1 = 3), X^5+X^4+X^2+X+1 with 4 columns
// (L = 4: no lag pulses) and with 1 column mod 31 = 1 (L = 2, T1 = 1). Rows
// are 3, 3 and 2, so L1 = L*NR mod 31 is computed here rather than assumed
// equal to L. The full state sequence, phase number and control outputs are
// checked every clock; the test length follows from the sequence length.
module tb_prt_monitor;

  logic clk = 1'b0, rst_n = 1'b0;
  logic done [3];
  int   ck [3], fl [3], nb [3];
  int checks, failures;

  always #5 clk = ~clk;

  // NC=4, NR=3, L=7: T1=3, L1=21, T2=10, T3=11.
  prt_monitor_harness #(.NC(4), .NR(3), .LAG(7), .T1(3), .T2(10), .T3(11)) h0
    (.clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .n_blk(nb[0]));
  // NC=4, NR=3, L=4: T1=0, L1=12, T2=19, T3=20.
  prt_monitor_harness #(.NC(4), .NR(3), .LAG(4), .T1(0), .T2(19), .T3(20)) h1
    (.clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .n_blk(nb[1]));
  // NC=32, NR=2, L=2: T1=1, L1=4, T2=27, T3=28.
  prt_monitor_harness #(.NC(32), .NR(2), .LAG(2), .T1(1), .T2(27), .T3(28)) h2
    (.clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .n_blk(nb[2]));

  function automatic void report();
    checks = ck[0] + ck[1] + ck[2];
    failures = failures + fl[0] + fl[1] + fl[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures = 1;
    $display("FAIL: watchdog expired");
    report();
    $finish;
  end

  initial begin
    failures = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    if (nb[0] == 0 || nb[1] == 0 || nb[2] == 0) begin
      failures++;
      $display("FAIL: a configuration had no blocking pulses");
    end
    report();
    $finish;
  end

endmodule

// The usable-lag workload: every lag 1..30 with each of the six fifth-order
// primitive polynomials, run through the complete structure on an 8 x 4 RAM
// model (see prt_lag_harness). The set of lags under which an interior cell
// meets all 32 neighbourhood patterns must have the published size (14, 14,
// 16 per polynomial pair), contain the lags printed as examples, be the same
// for a polynomial and its reciprocal, and contain 31 - L whenever it
// contains L.
module tb_prt_table1;

  localparam int NP = 6;
  localparam logic [4:0] TAPS [NP] = '{5'b00101, 5'b01001, 5'b01111, 5'b11101, 5'b10111, 5'b11011};
  localparam int TOTAL [3] = '{14, 14, 16};
  // Example lags printed for each pair.
  localparam int EX [3][6] = '{'{2, 3, 7, 24, 28, 29}, '{2, 3, 9, 22, 28, 29}, '{2, 4, 7, 24, 27, 29}};

  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NP][30];
  logic usable [NP][30];
  int   ck [NP][30], fl [NP][30];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar p = 0; p < NP; p++) begin : g_poly
    for (genvar l = 1; l <= 30; l++) begin : g_lag
      prt_lag_harness #(.TAPS(TAPS[p]), .LAG(l)) h (
        .clk, .rst_n, .done(done[p][l-1]), .usable(usable[p][l-1]),
        .checks(ck[p][l-1]), .failures(fl[p][l-1])
      );
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void report();
    for (int p = 0; p < NP; p++)
      for (int l = 0; l < 30; l++) begin
        checks += ck[p][l];
        failures += fl[p][l];
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    report();
    $finish;
  end

  initial begin
    bit all;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int p = 0; p < NP; p++)
        for (int l = 0; l < 30; l++) if (!done[p][l]) all = 1'b0;
    end while (!all);
    for (int p = 0; p < NP; p++) begin
      int n;
      string s;
      n = 0;
      s = "";
      for (int l = 1; l <= 30; l++) if (usable[p][l-1]) begin
        n++;
        s = {s, $sformatf(" %0d", l)};
        check(usable[p][31-l-1], $sformatf("taps %b: %0d usable but %0d not", TAPS[p], l, 31 - l));
      end
      $display("taps %b usable lags:%s", TAPS[p], s);
      check(n == TOTAL[p/2], $sformatf("taps %b: %0d usable lags, expected %0d", TAPS[p], n, TOTAL[p/2]));
      for (int k = 0; k < 6; k++)
        check(usable[p][EX[p/2][k]-1], $sformatf("taps %b: printed lag %0d not usable", TAPS[p], EX[p/2][k]));
      if (p % 2 == 1)
        for (int l = 0; l < 30; l++)
          check(usable[p][l] == usable[p-1][l], $sformatf("taps %b and reciprocal differ at lag %0d", TAPS[p], l + 1));
    end
    report();
    $finish;
  end

endmodule

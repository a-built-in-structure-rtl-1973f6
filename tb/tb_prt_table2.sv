// The lag table workload: for each of the six fifth-order primitive
// polynomials and each row size class NC mod 31 = 1, 2, 4, 8, 16, the
// structure is built with the table's suitable lag and checked with the
// table's printed T1, T2, T3 (see prt_table2_harness). Row sizes used:
// 32, 64, 4, 8 and 16 cells. 30 configurations run side by side.
module tb_prt_table2;

  localparam int NP = 6, NS = 5, NCFG = NP * NS;
  localparam logic [4:0] TAPS [NP] = '{5'b00101, 5'b01001, 5'b01111, 5'b11101, 5'b10111, 5'b11011};
  localparam int NCS [NS] = '{32, 64, 4, 8, 16};          // NC mod 31 = 1, 2, 4, 8, 16
  // Suitable lag and T1, T2, T3 as printed, per polynomial pair and row size.
  // Index: pair * 5 + size class.
  localparam int LS  [15] = '{2, 2, 7, 9, 16,  2, 2, 9, 9, 16,  2, 2, 4, 8, 16};
  localparam int T1S [15] = '{1, 0, 3, 1, 0,   1, 0, 5, 1, 0,   1, 0, 0, 0, 0};
  localparam int T2S [15] = '{29, 29, 24, 22, 15,  29, 29, 22, 22, 15,  29, 29, 27, 23, 15};
  localparam int T3S [15] = '{30, 30, 25, 23, 16,  30, 30, 23, 23, 16,  30, 30, 28, 24, 16};

  logic clk = 1'b0, rst_n = 1'b0;
  logic done [NCFG];
  int   ck [NCFG], fl [NCFG], nb [NCFG];
  int   checks, failures;

  always #5 clk = ~clk;

  for (genvar p = 0; p < NP; p++) begin : g_poly
    for (genvar s = 0; s < NS; s++) begin : g_size
      localparam int IDX = (p / 2) * NS + s;
      prt_table2_harness #(
        .TAPS(TAPS[p]), .NC(NCS[s]), .LAG(LS[IDX]),
        .TAB_T1(T1S[IDX]), .TAB_T2(T2S[IDX]), .TAB_T3(T3S[IDX])
      ) h (.clk, .rst_n, .done(done[p*NS+s]), .checks(ck[p*NS+s]),
           .failures(fl[p*NS+s]), .n_blk(nb[p*NS+s]));
    end
  end

  function automatic void report();
    checks = 0;
    for (int k = 0; k < NCFG; k++) begin
      checks += ck[k];
      failures += fl[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures = 1;
    $display("FAIL: watchdog expired");
    report();
    $finish;
  end

  initial begin
    bit all;
    int lag_free;
    failures = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int k = 0; k < NCFG; k++) if (!done[k]) all = 1'b0;
    end while (!all);
    // Lag pulses are avoided for 4 of the 5 row sizes with the last pair.
    lag_free = 0;
    for (int s = 0; s < NS; s++) if (T1S[2*NS+s] == 0) lag_free++;
    if (lag_free != 4) begin
      failures++;
      $display("FAIL: X^5+X^4+X^2+X+1 avoids lag pulses for %0d row sizes", lag_free);
    end
    for (int k = 0; k < NCFG; k++) if (nb[k] == 0) begin
      failures++;
      $display("FAIL: configuration %0d had no blocking pulses", k);
    end
    report();
    $finish;
  end

endmodule

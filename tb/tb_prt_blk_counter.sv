// Test of the blocking-pulse counter: for every T from 0 to 31, presetting
// it to 32 - T must give exactly T busy clocks, with "last" on the final one.
module tb_prt_blk_counter;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, busy, last;
  logic [4:0] preset = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prt_blk_counter #(.W(5)) dut (.clk, .rst_n, .load, .preset, .busy, .last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !last, "idle after reset");
    for (int t = 0; t < 32; t++) begin
      int nbusy, nlast, lastpos;
      load = 1'b1;
      preset = 5'((32 - t) % 32);
      @(negedge clk);
      load = 1'b0;
      nbusy = 0; nlast = 0; lastpos = -1;
      for (int k = 0; k < 40; k++) begin
        if (busy) nbusy++;
        if (last) begin
          nlast++;
          lastpos = k;
        end
        @(negedge clk);
      end
      check(nbusy == t, $sformatf("T=%0d gave %0d pulses", t, nbusy));
      check(t == 0 ? nlast == 0 : (nlast == 1 && lastpos == t - 1), $sformatf("T=%0d last flag", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Test of the test sequence generator with all six fifth-order primitive
// polynomials: the output must follow the recurrence worked out in the
// reference package, repeat with period exactly 31, hold when not stepped
// and restart at m[0] on init.
module tb_prt_tsg;
  import prt_tb_pkg::*;

  localparam logic [4:0] TAPS [6] = '{5'b00101, 5'b01001, 5'b01111, 5'b11101, 5'b10111, 5'b11011};
  localparam logic [4:0] SEED = 5'b00001;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, step = 1'b0;
  logic [5:0] m;
  logic [4:0] st [6];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 6; g++) begin : g_tsg
    prt_tsg #(.TAPS(TAPS[g]), .SEED(SEED)) dut (
      .clk, .rst_n, .init, .step, .m(m[g]), .state(st[g])
    );
  end

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
    logic [30:0] ref_m [6];
    for (int g = 0; g < 6; g++) ref_m[g] = mseq(TAPS[g], SEED);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Two full periods, one bit per clock.
    for (int k = 0; k < 62; k++) begin
      for (int g = 0; g < 6; g++)
        check(m[g] == ref_m[g][k % 31], $sformatf("poly %0d bit %0d", g, k));
      step = 1'b1;
      @(negedge clk);
    end
    // The state repeats only after 31 steps.
    for (int g = 0; g < 6; g++) check(st[g] == SEED, $sformatf("poly %0d period", g));
    step = 1'b1;
    @(negedge clk);
    for (int g = 0; g < 6; g++) check(st[g] != SEED, $sformatf("poly %0d period too short", g));
    // Hold.
    step = 1'b0;
    repeat (3) @(negedge clk);
    for (int g = 0; g < 6; g++) check(m[g] == ref_m[g][1], $sformatf("poly %0d hold", g));
    // Init restarts at m[0], and has priority over step.
    init = 1'b1; step = 1'b1;
    @(negedge clk);
    init = 1'b0; step = 1'b0;
    for (int g = 0; g < 6; g++) check(st[g] == SEED && m[g] == ref_m[g][0], $sformatf("poly %0d init", g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

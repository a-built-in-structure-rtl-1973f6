// Test of the address generation logic: a 5 x 3 and a 4 x 4 array are walked
// cell by cell with random stalls; the addresses must follow row-major order,
// the last-column and last-row flags must mark the right cells, and clear
// must return to cell (0, 0).
module tb_prt_agl;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [2:0] col_a; logic [1:0] row_a; logic cl_a, rl_a;
  logic [1:0] col_b; logic [1:0] row_b; logic cl_b, rl_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prt_agl #(.NC(5), .NR(3)) dut_a (.clk, .rst_n, .clear, .en, .col(col_a), .row(row_a),
                                   .col_last(cl_a), .row_last(rl_a));
  prt_agl #(.NC(4), .NR(4)) dut_b (.clk, .rst_n, .clear, .en, .col(col_b), .row(row_b),
                                   .col_last(cl_b), .row_last(rl_b));

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
    int na = 0, nb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      check(int'(col_a) == na % 5 && int'(row_a) == (na / 5) % 3, $sformatf("A address at step %0d", na));
      check(cl_a == (na % 5 == 4) && rl_a == ((na / 5) % 3 == 2), "A flags");
      check(int'(col_b) == nb % 4 && int'(row_b) == (nb / 4) % 4, $sformatf("B address at step %0d", nb));
      check(cl_b == (nb % 4 == 3) && rl_b == ((nb / 4) % 4 == 3), "B flags");
      en = ($urandom_range(3) != 0);
      if (k == 150) begin
        clear = 1'b1;
      end
      @(negedge clk);
      if (clear) begin
        na = 0; nb = 0; clear = 1'b0;
      end else if (en) begin
        na++; nb++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Test of the comparator: exhaustive for one bit, random for an 8-bit word;
// e must be the mismatch, and low whenever the compare is blocked.
module tb_prt_comparator;

  logic r1, x1, en, e1, e8;
  logic [7:0] r8, x8;
  int checks = 0, failures = 0;

  prt_comparator #(.W(1)) dut1 (.rdata(r1), .expected(x1), .en, .e(e1));
  prt_comparator #(.W(8)) dut8 (.rdata(r8), .expected(x8), .en, .e(e8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      {en, r1, x1} = 3'(k);
      r8 = '0; x8 = '0;
      #1;
      check(e1 == (en && (r1 != x1)), $sformatf("1-bit case %b", 3'(k)));
    end
    for (int k = 0; k < 200; k++) begin
      en = 1'($urandom);
      r8 = 8'($urandom);
      x8 = (k % 3 == 0) ? r8 : 8'($urandom);
      #1;
      check(e8 == (en && (r8 != x8)), $sformatf("8-bit %h vs %h en %b", r8, x8, en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

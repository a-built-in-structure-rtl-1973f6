// Blocking-pulse counter: a modulo (n+1) = 32 counter that counts up and
// stops when its content turns zero.
//
// Presetting it to (n + 1 - T) makes it count for exactly T clocks before it
// reaches zero, which gives the T1, T2 and T3 blocking pulses that hold the
// address counters, the comparator and the read/write strobe while the test
// sequence generator and the response collector are realigned. A preset of
// zero (T = 0) gives no pulse. This counter and its presets follow the
// design; the "last" output (the count is n, so the next clock ends the
// pulses) is added so the controller can leave a blocking state without an
// idle clock.
//
// Timing: load in cycle t; busy is high in cycles t+1 .. t+T.
module prt_blk_counter #(
  parameter int unsigned W = 5  // n + 1 = 2^W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,    // preset the counter
  input  logic [W-1:0] preset,  // n + 1 - T
  output logic         busy,    // blocking pulse active (count != 0)
  output logic         last     // final blocking pulse (count == n)
);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (load)         cnt <= preset;
    else if (cnt != '0)    cnt <= cnt + 1'b1;   // wraps to zero after n
  end

  assign busy = (cnt != '0);
  assign last = (cnt == '1);

endmodule

// Test Response Collector (TRC): a 32-bit fault register, one bit per
// neighbourhood pattern, so a failing read marks which of the 32 possible
// patterns around the base cell caused it.
//
// Pattern 1 is the all-zero pattern, present only during the clear/check
// phase; bit 1 records an error (e AND read) in that phase. Bits 32..2 form a
// ring that turns by one position on every clock of the M-sequence phases:
// bit k takes bit k+1, and bit 32 takes (bit 2) OR (e AND read). Because the
// pattern around consecutive cells advances by one sequence step per clock,
// the bit leaving position 2 is always the one belonging to the pattern
// around the cell being read, so an error is merged into exactly that
// pattern's bit. The controller keeps the ring in step with the generator
// during writes and blocking pulses, so the ring has turned a whole number of
// revolutions when the test ends and bit k then holds pattern k.
//
// After the test the contents can be flushed out serially: while flush is
// high, all 32 bits rotate towards bit 1 and so shows bit 1, so 32 flush
// clocks deliver patterns 1, 2, ..., 32 in that order and leave the register
// as it was. The contents are also available in parallel on q.
//
// The ring, the AND of e with R/W, the OR in front of bit 32 and the flushing
// out of the result follow the design; the separate bit 1, the clear input,
// the flush order and the parallel result port are this implementation's
// choices.
//
// Interface: clear empties the register; zero_phase routes errors to bit 1
// and holds the ring; shift turns the ring; flush rotates all 32 bits out
// through so. rd is R/W (1 = read). Priority: clear, flush, zero_phase,
// shift. Timing: one update per clock; q is the register contents.
module prt_trc (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,       // start of test: empty the register
  input  logic        zero_phase,  // all-zero (clear/check) phase
  input  logic        shift,       // turn the ring by one position
  input  logic        e,           // error signal from the comparator
  input  logic        rd,          // R/W: 1 = read, 0 = write
  input  logic        flush,       // shift the result out through so
  output logic [32:1] q,           // fault flag per pattern number
  output logic        so           // serial result (bit 1 first)
);

  logic hit;
  logic [32:1] r;

  always_comb begin
    hit = e & rd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (clear) begin
      r <= '0;
    end else if (flush) begin
      r <= {r[1], r[32:2]};
    end else if (zero_phase) begin
      r[1] <= r[1] | hit;
    end else if (shift) begin
      r[32]   <= r[2] | hit;
      r[31:2] <= r[32:3];
    end
  end

  assign q  = r;
  assign so = r[1];

`ifndef SYNTHESIS
  // An error outside the phases and clocks where it can be recorded would be
  // lost: the controller must never let that happen.
  a_no_lost_error: assert property (@(posedge clk) disable iff (!rst_n)
                                     hit |-> (zero_phase || shift) && !flush);
`endif

endmodule

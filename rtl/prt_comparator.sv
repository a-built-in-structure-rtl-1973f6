// Comparator: compares the bit read from the RAM with the bit regenerated by
// the test sequence generator and raises the error signal e on a mismatch.
//
// The compare is blocked (e held low) whenever en is low: during writes'
// blocking pulses and outside read accesses. The design names this
// function; its form, an exclusive-OR gated by an enable, is the simplest
// that does it. Multi-bit words are supported through W (1 for a
// bit-oriented RAM); e is the OR of the bitwise mismatches.
//
// Timing: purely combinational, in the same cycle as the read.
module prt_comparator #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] rdata,     // data read from the RAM
  input  logic [W-1:0] expected,  // regenerated test data
  input  logic         en,        // compare enabled (read access, not blocked)
  output logic         e          // error signal
);

  always_comb begin
    e = en & (|(rdata ^ expected));
  end

endmodule

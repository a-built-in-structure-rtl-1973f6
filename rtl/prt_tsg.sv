// Test Sequence Generator (TSG): a five-stage linear feedback shift register
// that produces the fifth-order M-sequence m[0], m[1], ... of period 31.
//
// The register holds five consecutive sequence bits, s[0] = m[k] ..
// s[4] = m[k+4]. The output is s[0]; on every enabled clock the register
// shifts down by one and the new top bit is the recurrence
//   m[k+5] = c4*m[k+4] ^ c3*m[k+3] ^ c2*m[k+2] ^ c1*m[k+1] ^ c0*m[k]
// for the characteristic polynomial X^5 + c4 X^4 + c3 X^3 + c2 X^2 + c1 X + c0.
// TAPS holds c4..c0. The default is X^5 + X^4 + X^2 + X + 1, the polynomial
// the design recommends because it needs no lag pulses for four of the five
// power-of-two row sizes. The all-zero-free seed, which fixes where m[0] is,
// is this implementation's choice.
//
// Interface: init reloads the seed (has priority), step advances one bit.
// Timing: m is valid combinationally from the register; one step per clock.
module prt_tsg #(
  parameter logic [4:0] TAPS = 5'b10111,  // c4..c0 of X^5+X^4+X^2+X+1
  parameter logic [4:0] SEED = 5'b00001   // m[0..4] = s[0..4]
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,   // load SEED: sequence restarts at m[0]
  input  logic       step,   // advance the sequence by one bit
  output logic       m,      // current sequence bit
  output logic [4:0] state   // current register contents
);

  logic [4:0] s;
  logic       fb;

  always_comb begin
    fb = ^(s & TAPS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      s <= SEED;
    else if (init)   s <= SEED;
    else if (step)   s <= {fb, s[4:1]};
  end

  assign m     = s[0];
  assign state = s;

`ifndef SYNTHESIS
  // An all-zero register would lock the generator.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) s != 5'b0);
`endif

endmodule

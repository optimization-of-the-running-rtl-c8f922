// lfsr: pseudo-random threshold generator, one per ant.
//
// A Galois linear feedback shift register shifting right by one bit per
// enabled cycle; when the bit shifted out is one, the feedback mask is XORed
// into the state. The default 16-bit mask 0xB400 (x^16+x^14+x^13+x^11+1) is
// maximal length, so the state visits all 65535 non-zero values. The use of an
// LFSR as the random source follows the algorithm; the polynomial, width and
// seeds are this design's choice.
//
// Interface: `value` is the current state. Reset (synchronous, active low)
// loads SEED; each cycle with `en` high advances one step, visible the next
// cycle.
module lfsr #(
  parameter int unsigned W    = 16,
  parameter logic [W-1:0] TAPS = W'(16'hB400),
  parameter logic [W-1:0] SEED = W'(16'hACE1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] value
);

  logic [W-1:0] state;

  always_ff @(posedge clk) begin
    if (!rst_n)   state <= (SEED == '0) ? W'(1) : SEED;
    else if (en)  state <= (state >> 1) ^ (state[0] ? TAPS : '0);
  end

  assign value = state;

endmodule

// lfsr: the "Rand Gen." of the stochastic traffic generator.
//
// A Galois linear feedback shift register. Each cycle with step=1 it shifts
// right by one and, when the bit shifted out is 1, XORs the TAPS mask into the
// state. The default mask 16'hB400 (x^16 + x^14 + x^13 + x^11 + 1) gives the
// maximal period of 65535 states. load=1 copies seed into the state; an all-
// zero seed, which would lock the register, is replaced by 1. load takes
// priority over step. The output q is the registered state.
//
// The document gives the generator a seed register per random generator;
// the width, the polynomial and the Galois form are this design's choice.
module lfsr #(
  parameter int unsigned   W    = 16,
  parameter logic [W-1:0]  TAPS = 16'hB400
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= W'(1);
    end else if (load) begin
      q <= (seed == '0) ? W'(1) : seed;
    end else if (step) begin
      q <= q[0] ? ((q >> 1) ^ TAPS) : (q >> 1);
    end
  end

endmodule

// lfsr: pseudo-random number generator that seeds the perceptron weights.
//
// A 32-bit Galois linear-feedback shift register with the maximal-length
// polynomial x^32 + x^22 + x^2 + x + 1 (period 2^32 - 1). Each cycle with
// step high it advances one state; value always shows the current state.
// Reset loads SEED, which must be non-zero.
//
// The document names a pseudo-random generator block only; its length,
// polynomial and seed are this design's choices.
module lfsr #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [31:0] value
);

  // taps of x^32 + x^22 + x^2 + x + 1 in Galois (right-shift) form
  localparam logic [31:0] TAPS = 32'h8020_0003;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    value <= SEED;
    else if (step) value <= (value >> 1) ^ (value[0] ? TAPS : 32'd0);
  end

  initial assert (SEED != 32'd0) else $error("lfsr: SEED must be non-zero");

endmodule

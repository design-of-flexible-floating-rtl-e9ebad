// rng_lfsr: 40-bit pseudo-random number generator.
//
// A Fibonacci linear feedback shift register over GF(2) with the maximal-
// length polynomial x^40 + x^38 + x^21 + x^19 + 1. It advances one step per
// cycle while en is high and is reloaded from seed when load is high; an
// all-zero seed, the one state the register cannot leave, is replaced by
// 1. The output num is the register itself. The 40-bit width follows the
// num[39:0] port of the error-correction block; the polynomial is this
// design's choice.
module rng_lfsr #(
  localparam int unsigned W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] num
);
  logic fb;
  assign fb = num[39] ^ num[37] ^ num[20] ^ num[18];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      num <= W'(1);
    else if (load)   num <= (seed == '0) ? W'(1) : seed;
    else if (en)     num <= {num[W-2:0], fb};
  end
endmodule

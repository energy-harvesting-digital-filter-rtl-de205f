// tsm_shifter: skip multiplexer, MSB shift and 2-bit shifter of the
// two-speed multiplier.
//
// The product register P holds {H, L, e}: H is the WIDTH+2-bit signed
// accumulator, L the WIDTH-bit multiplier being consumed from the bottom and
// later the low half of the product, e the Booth bit y[2j-1] below L. Every
// step retires one radix-4 digit: the multiplexer picks the accumulator
// unchanged (skip) or the adder's sum, and the whole register is shifted two
// places to the right, the MSB of the picked value being copied into the two
// vacated top bits (arithmetic shift). `product` is the 2*WIDTH-bit view of
// the shifted value, so the final product is available in the cycle of the
// last step. The source's block diagram draws the MSB shift on the adder
// output ahead of the multiplexer; here the multiplexer comes first and one
// shifter serves both paths, which gives the same result. The register
// layout is this design's choice. Purely combinational.
module tsm_shifter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [2*WIDTH+2:0]  p_cur,
  input  logic [WIDTH+1:0]    sum,
  input  logic                skip,
  output logic [2*WIDTH+2:0]  p_next,
  output logic [2*WIDTH-1:0]  product
);

  logic [WIDTH+1:0] acc;

  assign acc     = skip ? p_cur[2*WIDTH+2:WIDTH+1] : sum;
  assign p_next  = {{2{acc[WIDTH+1]}}, acc, p_cur[WIDTH:2]};
  assign product = p_next[2*WIDTH:1];

endmodule

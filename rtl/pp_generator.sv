// pp_generator: radix-4 Booth partial product generator.
//
// Selects 0, A or 2A from the signed multiplicand `a` (WIDTH bits) according
// to the Booth digit, sign-extended to WIDTH+2 bits (the width of the
// multiplier's accumulator). A negative digit is formed as a two's
// complement: the generator outputs the one's complement of the magnitude and
// raises `cin`, which the following adder adds as its carry-in, so no separate
// incrementer is needed. 2A is A shifted left by one bit.
// Purely combinational.
module pp_generator
  import tsm_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  booth_digit_t       digit,
  output logic [WIDTH+1:0]   pp,
  output logic               cin
);

  logic [WIDTH+1:0] a_ext;
  logic [WIDTH+1:0] mag;

  always_comb begin
    a_ext = {{2{a[WIDTH-1]}}, a};
    if (digit.two)      mag = a_ext << 1;
    else if (digit.one) mag = a_ext;
    else                mag = '0;
    pp  = digit.neg ? ~mag : mag;
    cin = digit.neg;
  end

endmodule

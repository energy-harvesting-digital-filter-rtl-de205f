// booth_encoder: radix-4 (modified) Booth recoder.
//
// Takes one overlapping three-bit window of the multiplier,
// win = {y[2j+1], y[2j], y[2j-1]} (y[-1] = 0), and returns the digit it stands
// for, one of 0, +A, +2A, -A, -2A, as the fields neg/two/one of
// tsm_pkg::booth_digit_t. The mapping is the standard radix-4 Booth table:
//   000 +0   001 +A   010 +A   011 +2A
//   100 -2A  101 -A   110 -A   111 +0
// `zero` flags the two windows 000 and 111, the digits the two-speed
// multiplier skips. The table follows the source's radix-4 encoding table;
// the neg/two/one form of the digit is this design's choice. Purely
// combinational.
module booth_encoder
  import tsm_pkg::*;
(
  input  logic [2:0]   win,
  output booth_digit_t digit,
  output logic         zero
);

  always_comb begin
    digit.one = win[1] ^ win[0];
    digit.two = (win == 3'b011) || (win == 3'b100);
    // 111 is +0, so it must not raise neg
    digit.neg = win[2] & ~(win[1] & win[0]);
    zero      = (win == 3'b000) || (win == 3'b111);
  end

endmodule

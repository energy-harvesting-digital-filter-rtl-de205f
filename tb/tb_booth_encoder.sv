// tb_booth_encoder: exhaustive test of the radix-4 Booth recoder. For all
// eight windows it checks the signed digit value (neg/two/one) against
// -2*w[2] + w[1] + w[0], and the zero flag.
module tb_booth_encoder;
  import tsm_pkg::*;
  logic [2:0] win;
  booth_digit_t digit;
  logic zero;
  int checks = 0, failures = 0;

  booth_encoder dut (.win(win), .digit(digit), .zero(zero));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int exp_v, got_v;
      win = 3'(i);
      #1;
      exp_v = -2 * int'(win[2]) + int'(win[1]) + int'(win[0]);
      got_v = (digit.two ? 2 : digit.one ? 1 : 0) * (digit.neg ? -1 : 1);
      checks++;
      if (got_v != exp_v || (digit.one && digit.two)) begin
        failures++;
        $display("FAIL win=%b got %0d exp %0d", win, got_v, exp_v);
      end
      checks++;
      if (zero != (exp_v == 0) || (exp_v == 0 && digit.neg)) begin
        failures++;
        $display("FAIL zero/neg for win=%b", win);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

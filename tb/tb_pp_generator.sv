// tb_pp_generator: checks that pp + cin equals digit * a (in WIDTH+2 bits)
// for every digit value and random, corner and negative multiplicands.
module tb_pp_generator;
  import tsm_pkg::*;
  localparam int W = 32;
  logic [W-1:0] a;
  booth_digit_t digit;
  logic [W+1:0] pp;
  logic cin;
  int checks = 0, failures = 0;

  pp_generator #(.WIDTH(W)) dut (.a(a), .digit(digit), .pp(pp), .cin(cin));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(input logic [W-1:0] x, input int d);
    longint exp_v, got_v;
    a = x;
    digit.neg = (d < 0);
    digit.two = (d == 2 || d == -2);
    digit.one = (d == 1 || d == -1);
    #1;
    exp_v = longint'($signed(x)) * d;
    got_v = longint'($signed(pp)) + longint'(cin);
    checks++;
    if (got_v != exp_v) begin
      failures++;
      $display("FAIL a=%0d d=%0d got %0d exp %0d", $signed(x), d, got_v, exp_v);
    end
  endtask

  initial begin
    for (int d = -2; d <= 2; d++) begin
      try_one(32'h8000_0000, d);
      try_one(32'h7fff_ffff, d);
      try_one(0, d);
      try_one(32'hffff_ffff, d);
      for (int i = 0; i < 200; i++) try_one($urandom, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mksa_adder: tests the modified Kogge-Stone adder.
// The 8-bit adder (the default) is checked exhaustively over a, b and cin,
// and its prefix network is checked against the 8-bit figure it follows:
// black cells at 7:6, 6:5, 5:4, 4:3, 3:2 (first level) and 7:4, 6:3 (second
// level), seven in all. A 34-bit and a 64-bit instance, the widths used by
// the multipliers, are checked with random and carry-chain operands.
module tb_mksa_adder;
  import tsm_pkg::*;
  logic [7:0] a8, b8, s8;
  logic c8, co8;
  logic [33:0] a34, b34, s34;
  logic c34, co34;
  logic [63:0] a64, b64, s64;
  logic c64, co64;
  int checks = 0, failures = 0;

  mksa_adder dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));
  mksa_adder #(.WIDTH(34)) dut34 (.a(a34), .b(b34), .cin(c34), .sum(s34), .cout(co34));
  mksa_adder #(.WIDTH(64)) dut64 (.a(a64), .b(b64), .cin(c64), .sum(s64), .cout(co64));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MKSA_MAXW-1:0] m1, m2, m3;
    // Structure of the 8-bit network
    m1 = mksa_black_mask(8, 1);
    m2 = mksa_black_mask(8, 2);
    checks++;
    if (m1[7:0] != 8'b1111_1000 || m2[7:0] != 8'b1100_0000) begin
      failures++;
      $display("FAIL 8-bit black cells: %b %b", m1[7:0], m2[7:0]);
    end
    checks++;
    if (mksa_level(1) != 0 || mksa_level(2) != 0 || mksa_level(3) != 1 || mksa_level(4) != 1 ||
        mksa_level(5) != 1 || mksa_level(6) != 2 || mksa_level(7) != 2) begin
      failures++;
      $display("FAIL 8-bit grey cell routing");
    end
    // Fewer black cells than a Kogge-Stone adder at 64 bits
    m1 = mksa_black_mask(64, 1); m2 = mksa_black_mask(64, 2); m3 = mksa_black_mask(64, 3);
    checks++;
    if ($countones(m1) >= 62 || $countones(m2) >= 60 || $countones(m3) >= 56) begin
      failures++;
      $display("FAIL 64-bit network not reduced");
    end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d = %0d", i, j, c, {co8, s8});
          end
        end
    for (int i = 0; i < 20000; i++) begin
      a34 = {$urandom, $urandom}; b34 = {$urandom, $urandom}; c34 = 1'($urandom);
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom}; c64 = 1'($urandom);
      if (i % 4 == 0) begin b34 = ~a34; b64 = ~a64; end  // full carry chains
      #1;
      checks++;
      if ({co34, s34} != {1'b0, a34} + {1'b0, b34} + 35'(c34)) begin
        failures++;
        if (failures < 10) $display("FAIL 34-bit %h+%h", a34, b34);
      end
      checks++;
      if ({co64, s64} != {1'b0, a64} + {1'b0, b64} + 65'(c64)) begin
        failures++;
        if (failures < 10) $display("FAIL 64-bit %h+%h", a64, b64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

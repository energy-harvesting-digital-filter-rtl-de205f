// tb_spst_adder: tests the SPST adder at the multiplier's width (34 bits).
// Random operands, operands whose upper half is a sign extension (so the
// upper adder is isolated) with every sign combination, and carries out of the
// lower half. Checks the sum modulo 2^34, that `msp_off` is raised exactly
// when both upper halves are sign extensions, and that the isolated upper
// adder's operands are held at zero.
module tb_spst_adder;
  localparam int W = 34;
  localparam int L = W / 2;
  logic [W-1:0] a, b, s;
  logic cin, off;
  int checks = 0, failures = 0, n_off = 0, n_on = 0;

  spst_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(s), .msp_off(off));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] sext_small(logic [L-1:0] v);
    return {{(W-L){v[L-1]}}, v};
  endfunction

  task automatic try_one(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic exp_off;
    a = x; b = y; cin = c;
    #1;
    exp_off = (x[W-1:L] == '0 || x[W-1:L] == '1) && (y[W-1:L] == '0 || y[W-1:L] == '1);
    checks++;
    if (s != W'(x + y + W'(c))) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %h", x, y, c, s);
    end
    checks++;
    if (off != exp_off || (off && (dut.a_iso != '0 || dut.b_iso != '0))) begin
      failures++;
      if (failures < 10) $display("FAIL msp_off for %h %h", x, y);
    end
    if (off) n_off++; else n_on++;
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      try_one({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
      try_one(sext_small(L'($urandom)), sext_small(L'($urandom)), 1'($urandom));
      try_one({{(W-L){1'b0}}, L'($urandom)}, {{(W-L){1'b1}}, L'($urandom)}, 1'($urandom));
      try_one({{(W-L){1'b1}}, L'($urandom)}, {{(W-L){1'b1}}, L'($urandom)}, 1'($urandom));
      try_one({{(W-L){1'b0}}, L'($urandom)}, {{(W-L){1'b0}}, L'($urandom)}, 1'($urandom));
    end
    try_one({{(W-L){1'b0}}, {L{1'b1}}}, {{(W-L){1'b0}}, {L{1'b1}}}, 1'b1);
    try_one({{(W-L){1'b1}}, {L{1'b0}}}, {{(W-L){1'b1}}, {L{1'b0}}}, 1'b0);
    checks++;
    if (n_off == 0 || n_on == 0) begin
      failures++;
      $display("FAIL isolation not exercised both ways");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spst_tsm: end-to-end test of the two-speed multiplier at its default
// size (32 x 32 -> 64 bits, 16 Booth digits, KP = 2).
//
// Drives the operand pairs of the reference simulation waveform, sign and
// range corners, and random pairs. For each it checks the product against a
// 64-bit signed multiplication, checks the busy time against
// (N - O) + O*KP computed from the Booth digits of b, and checks that the
// product is already correct in the `done` cycle and still held afterwards.
// It counts how often each mechanism occurred (skipped digit, slow digit,
// negative digit, SPST isolation on and off) and
// counts a failure for any that never did.
module tb_spst_tsm;
  localparam int W  = 32;
  localparam int N  = W / 2;
  localparam int KP = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] product;
  logic busy, done;

  int checks = 0, failures = 0;
  int n_skip = 0, n_slow = 0, n_neg = 0, n_iso = 0, n_noiso = 0, n_ops = 0;

  spst_tsm dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                .product(product), .busy(busy), .done(done));

  always #5 clk = ~clk;

  // Mechanism counters, sampled at each product-register step
  always @(posedge clk) begin
    if (dut.step) begin
      if (dut.skip) n_skip++;
      else begin
        n_slow++;
        if (dut.digit.neg) n_neg++;
        if (dut.msp_off) n_iso++; else n_noiso++;
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_cycles(logic [W-1:0] y);
    int o = 0;
    logic [W:0] ye = {y, 1'b0};
    for (int j = 0; j < N; j++) begin
      logic [2:0] w3 = ye[2*j +: 3];
      if (w3 != 3'b000 && w3 != 3'b111) o++;
    end
    return (N - o) + o * KP;
  endfunction

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    longint exp_p;
    int cyc;
    exp_p = longint'($signed(x)) * longint'($signed(y));
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = $urandom; b = $urandom;  // operands must have been captured
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > N * KP + 4) break;
    end
    checks++;
    if (product !== exp_p) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d exp %0d", $signed(x), $signed(y), $signed(product), exp_p);
    end
    checks++;
    if (cyc != expected_cycles(y)) begin
      failures++;
      $display("FAIL cycles for y=%h: got %0d exp %0d", y, cyc, expected_cycles(y));
    end
    @(negedge clk);
    checks++;
    if (busy || product !== exp_p) begin
      failures++;
      $display("FAIL product not held after done");
    end
    n_ops++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Operand pairs printed in the reference waveform
    check(7, 37);   check(25, 32);  check(11, 29);  check(18, 47);
    check(12, 29);  check(39, 26);  check(47, 22);  check(35, 5);
    // Corners
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h7fff_ffff, 32'h8000_0000);
    check(32'h7fff_ffff, 32'h7fff_ffff);
    check(32'hffff_ffff, 32'hffff_ffff);
    check(0, 32'h5555_5555);
    check(32'h1234_5678, 0);
    check(32'h8000_0000, 32'h5555_5555);
    check(-5, 32'haaaa_aaab);
    for (int i = 0; i < 300; i++) check($urandom, $urandom);
    for (int i = 0; i < 100; i++) check($urandom & 32'hff, $urandom & 32'hfff);
    // Negative multipliers
    for (int i = 0; i < 20; i++) check($urandom, -$urandom);

    checks++; if (n_skip == 0)  begin failures++; $display("FAIL no skipped digit"); end
    checks++; if (n_slow == 0)  begin failures++; $display("FAIL no slow digit"); end
    checks++; if (n_neg == 0)   begin failures++; $display("FAIL no negative digit"); end
    checks++; if (n_iso == 0)   begin failures++; $display("FAIL SPST isolation never on"); end
    checks++; if (n_noiso == 0) begin failures++; $display("FAIL SPST isolation never off"); end
    $display("ops=%0d skip=%0d slow=%0d neg=%0d iso=%0d noiso=%0d",
             n_ops, n_skip, n_slow, n_neg, n_iso, n_noiso);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

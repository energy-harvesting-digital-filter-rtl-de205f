// tb_spst_tsm_w64: the two-speed multiplier built for 64-bit operands
// (32 Booth digits, 128-bit product) with a three-cycle slow addition
// (KP = 3). Random, corner and sparse operands; checks the product against a
// 128-bit signed multiplication and the busy time against (N - O) + O*KP.
module tb_spst_tsm_w64;
  localparam int W  = 64;
  localparam int N  = W / 2;
  localparam int KP = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] product;
  logic busy, done;
  int checks = 0, failures = 0, n_skip = 0, n_slow = 0;

  spst_tsm #(.WIDTH(W), .KP(KP)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                                      .product(product), .busy(busy), .done(done));

  always #5 clk = ~clk;

  always @(posedge clk) if (dut.step) begin
    if (dut.skip) n_skip++; else n_slow++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic signed [2*W-1:0] exp_p;
    logic [W:0] ye;
    int cyc, o;
    exp_p = (2*W)'($signed(x)) * (2*W)'($signed(y));
    ye = {y, 1'b0};
    o = 0;
    for (int j = 0; j < N; j++) if (ye[2*j +: 3] != 3'b000 && ye[2*j +: 3] != 3'b111) o++;
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc <= N * KP + 4) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (product !== exp_p) begin
      failures++;
      $display("FAIL %h * %h: got %h exp %h", x, y, product, exp_p);
    end
    checks++;
    if (cyc != (N - o) + o * KP) begin
      failures++;
      $display("FAIL cycles %0d exp %0d", cyc, (N - o) + o * KP);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'h7fff_ffff_ffff_ffff, 64'h8000_0000_0000_0000);
    check(-1, -1);
    check(7, 37);
    check(64'h0123_4567_89ab_cdef, 64'h5555_5555_5555_5555);
    for (int i = 0; i < 200; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 100; i++) check({$urandom, $urandom}, 64'($signed(16'($urandom))));
    checks++;
    if (n_skip == 0 || n_slow == 0) begin failures++; $display("FAIL both speeds not used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

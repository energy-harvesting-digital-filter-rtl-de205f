// tb_tsm_control: tests the two-speed controller on its own, with
// KP = 3 so the multicycle wait is visible. A model of the product
// register's low bits feeds it a programmed sequence of Booth windows (one
// per step). For each operation the test checks that skipped windows take
// one cycle and the others KP cycles, that exactly N steps happen, that
// `done` comes with the N-th step, that `load` only answers `start` while idle
// and that a start while busy is ignored.
module tb_tsm_control;
  localparam int N  = 16;
  localparam int KP = 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0] p_low;
  logic load, skip, step, busy, done;
  logic [2:0] seq [N];
  int idx;
  int checks = 0, failures = 0;

  tsm_control #(.N(N), .KP(KP)) dut (.clk(clk), .rst_n(rst_n), .start(start), .p_low(p_low),
                                     .load(load), .skip(skip), .step(step), .busy(busy), .done(done));

  always #5 clk = ~clk;
  assign p_low = (idx < N) ? seq[idx] : 3'b000;

  always @(posedge clk) begin
    if (load) idx <= 0;
    else if (step) idx <= idx + 1;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op();
    int exp_cyc = 0, cyc = 0, steps = 0;
    for (int j = 0; j < N; j++) begin
      seq[j] = 3'($urandom);
      if (j % 5 == 0) seq[j] = 3'b111;
      exp_cyc += (seq[j] == 3'b000 || seq[j] == 3'b111) ? 1 : KP;
    end
    @(negedge clk);
    start = 1'b1;
    #1;
    checks++;
    if (!load) begin failures++; $display("FAIL no load"); end
    @(negedge clk);
    // start held while busy must be ignored
    #1;
    checks++;
    if (load) begin failures++; $display("FAIL load while busy"); end
    start = 1'b0;
    while (1) begin
      cyc++;
      if (step) steps++;
      if (done) break;
      if (cyc > N * KP + 5) break;
      @(negedge clk);
      #1;
    end
    checks++;
    if (cyc != exp_cyc || steps != N) begin
      failures++;
      $display("FAIL cycles %0d exp %0d steps %0d", cyc, exp_cyc, steps);
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    idx = N;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || step || done) begin failures++; $display("FAIL reset state"); end
    for (int i = 0; i < 200; i++) run_op();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

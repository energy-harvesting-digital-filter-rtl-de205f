// tb_tsm_shifter: checks one step of the product register for random
// register contents and sums, in skip and add mode: the picked accumulator
// (old H or the sum) is shifted right two places as a signed number, its low
// two bits move into the top of L, L[1] becomes the new Booth bit, and the
// product view is the low 2*WIDTH bits above that bit.
module tb_tsm_shifter;
  localparam int W = 32;
  logic [2*W+2:0] p_cur, p_next;
  logic [W+1:0] sum;
  logic skip;
  logic [2*W-1:0] product;
  int checks = 0, failures = 0;

  tsm_shifter #(.WIDTH(W)) dut (.p_cur(p_cur), .sum(sum), .skip(skip), .p_next(p_next), .product(product));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [W+1:0] acc, h_new;
      logic [W-1:0] l_old, l_new;
      logic [2*W+2:0] exp_p;
      p_cur = {$urandom, $urandom, $urandom};
      sum = {$urandom, $urandom};
      skip = 1'($urandom);
      #1;
      acc   = skip ? p_cur[2*W+2:W+1] : sum;
      l_old = p_cur[W:1];
      h_new = $signed(acc) >>> 2;
      l_new = {acc[1:0], l_old[W-1:2]};
      exp_p = {h_new, l_new, l_old[1]};
      checks++;
      if (p_next != exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL step skip=%0d", skip);
      end
      checks++;
      if (product != {h_new[W-1:0], l_new}) begin
        failures++;
        if (failures < 10) $display("FAIL product view");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

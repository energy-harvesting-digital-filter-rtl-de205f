// spst_tsm: SPST-based two-speed radix-4 serial-parallel Booth multiplier.
//
// Multiplies two signed WIDTH-bit numbers, a (multiplicand) and b
// (multiplier), into a signed 2*WIDTH-bit product, retiring one radix-4 Booth
// digit of b per step (N = WIDTH/2 steps). The product register P =
// {H, L, e} starts as {0, b, 0}. Each step the encoder recodes P[2:0], the
// partial product generator forms 0, +-a or +-2a, the SPST adder adds it to
// the accumulator H, and the shifter moves P two places right. Digits that
// recode to zero are skipped in one cycle; the others wait KP cycles for the
// adder (two-speed operation). Latency in busy cycles is (N - O) + O * KP
// with O the number of non-zero digits of b.
//
// Interface: pulse `start` while idle with a and b valid; `busy` is high
// from the next cycle on; `done` pulses in the last busy cycle, when
// `product` already shows the result (taken from the shifter). `product`
// then holds its value until the next start. Reset is asynchronous, active
// low. WIDTH = 32 and N = 16 follow the source's simulation; KP, the reset
// and the handshake are this design's choices.
module spst_tsm
  import tsm_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned KP    = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic [2*WIDTH-1:0]   product,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned N  = WIDTH / 2;
  localparam int unsigned AW = WIDTH + 2;

  logic [2*WIDTH+2:0] p_reg, p_next;
  logic [WIDTH-1:0]   a_reg;
  logic [AW-1:0]      pp, sum;
  logic [2*WIDTH-1:0] shifted_product;
  logic               pp_cin, load, skip, step, msp_off, digit_zero;
  booth_digit_t       digit;

  tsm_control #(.N(N), .KP(KP)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .p_low(p_reg[2:0]),
    .load (load),
    .skip (skip),
    .step (step),
    .busy (busy),
    .done (done)
  );

  booth_encoder u_enc (
    .win  (p_reg[2:0]),
    .digit(digit),
    .zero (digit_zero)
  );

  pp_generator #(.WIDTH(WIDTH)) u_ppg (
    .a    (a_reg),
    .digit(digit),
    .pp   (pp),
    .cin  (pp_cin)
  );

  spst_adder #(.WIDTH(AW)) u_add (
    .a      (p_reg[2*WIDTH+2:WIDTH+1]),
    .b      (pp),
    .cin    (pp_cin),
    .sum    (sum),
    .msp_off(msp_off)
  );

  tsm_shifter #(.WIDTH(WIDTH)) u_shift (
    .p_cur  (p_reg),
    .sum    (sum),
    .skip   (skip),
    .p_next (p_next),
    .product(shifted_product)
  );

  // Product register and multiplicand register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_reg <= '0;
      a_reg <= '0;
    end else if (load) begin
      p_reg <= {{AW{1'b0}}, b, 1'b0};
      a_reg <= a;
    end else if (step) begin
      p_reg <= p_next;
    end
  end

  assign product = busy ? shifted_product : p_reg[2*WIDTH:1];

  // The encoder's zero flag and the controller's skip decision must agree
  a_skip_zero: assert property (@(posedge clk) disable iff (!rst_n) busy |-> (skip == digit_zero));

endmodule

// spst_adder: adder with spurious power suppression (SPST).
//
// The WIDTH-bit addition is split into a least significant part (LSP, the
// low LSP_W bits) and a most significant part (MSP), each a modified
// Kogge-Stone adder. Detection logic looks at the MSP of both operands: when
// each is a pure sign extension (all zeros or all ones), the MSP adder has no
// useful work to do. Its operands are then held at zero by isolation gates,
// so it does not toggle, and the MSP of the sum is rebuilt from the two sign
// bits and the LSP carry-out by a few gates:
//   both zero:  {0..0, c}     both one: {1..1, c}     mixed: {~c, .., ~c}
// Operand isolation with AND gates, the split into two halves and this
// compensation rule are this design's choices; the source names the
// technique (suppressing unwanted transitions in the adder) without giving
// its gates.
//
// Purely combinational. `msp_off` reports that the MSP adder is isolated.
module spst_adder #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned LSP_W = WIDTH / 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             msp_off
);

  localparam int unsigned MSP_W = WIDTH - LSP_W;

  logic [MSP_W-1:0] a_msp, b_msp, a_iso, b_iso, msp_sum, msp_comp;
  logic             lsp_cout, msp_cout, sa, sb;

  assign a_msp = a[WIDTH-1:LSP_W];
  assign b_msp = b[WIDTH-1:LSP_W];

  // Detection logic
  assign sa      = a[WIDTH-1];
  assign sb      = b[WIDTH-1];
  assign msp_off = (a_msp == {MSP_W{sa}}) && (b_msp == {MSP_W{sb}});

  mksa_adder #(.WIDTH(LSP_W)) u_lsp (
    .a   (a[LSP_W-1:0]),
    .b   (b[LSP_W-1:0]),
    .cin (cin),
    .sum (sum[LSP_W-1:0]),
    .cout(lsp_cout)
  );

  // Isolation of the MSP adder's operands
  assign a_iso = a_msp & {MSP_W{~msp_off}};
  assign b_iso = b_msp & {MSP_W{~msp_off}};

  mksa_adder #(.WIDTH(MSP_W)) u_msp (
    .a   (a_iso),
    .b   (b_iso),
    .cin (lsp_cout & ~msp_off),
    .sum (msp_sum),
    .cout(msp_cout)
  );

  // Sign-extension compensation
  always_comb begin
    if (sa && sb)      msp_comp = {{(MSP_W-1){1'b1}}, lsp_cout};
    else if (sa || sb) msp_comp = {MSP_W{~lsp_cout}};
    else               msp_comp = {{(MSP_W-1){1'b0}}, lsp_cout};
  end

  assign sum[WIDTH-1:LSP_W] = msp_off ? msp_comp : msp_sum;

endmodule

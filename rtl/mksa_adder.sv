// mksa_adder: modified Kogge-Stone parallel prefix adder, WIDTH bits plus
// carry-in.
//
// Three stages, as in any parallel prefix adder: pre-processing forms the
// bit generate g = a & b and propagate p = a ^ b (the carry-in is folded into
// bit 0's generate); the prefix (PG) network forms every carry G[i:0]; the
// post-processing stage forms sum[i] = p[i] ^ G[i-1:0]. Black cells
// (G = Gh | Ph & Gl, P = Ph & Pl) build power-of-two groups as in a
// Kogge-Stone adder, but only those that some carry uses; every carry is then
// finished by one grey cell (G = Gh | Ph & Gl) that joins such a group with a
// carry already computed, rerouting the wire instead of keeping the redundant
// black cells. The network is taken from the 8-bit figure of the source;
// tsm_pkg::mksa_level() holds the rule that extends it to other widths, which
// is this design's own. The depth stays ceil(log2(WIDTH)) cell levels.
//
// Purely combinational. Ports: a, b, cin in; sum, cout out.
module mksa_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  import tsm_pkg::*;

  localparam int unsigned LEVELS = (WIDTH > 2) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p0;  // bit propagate, also used by post-processing
  logic [WIDTH-1:0] gc;  // prefix carries: gc[i] = G[i:0] including cin

  // Level l holds the group generate/propagate G[i:i-2^l+1], P[i:i-2^l+1]
  // of every bit i that has a black cell at that level (zero elsewhere).
  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_lvl
    logic [WIDTH-1:0] g;
    logic [WIDTH-1:0] p;
    if (l == 0) begin : g_pre
      // Pre-processing
      assign p0 = a ^ b;
      assign g  = {a[WIDTH-1:1] & b[WIDTH-1:1], (a[0] & b[0]) | (p0[0] & cin)};
      assign p  = p0;
    end else begin : g_pg
      localparam logic [MKSA_MAXW-1:0] MASK = mksa_black_mask(WIDTH, l);
      for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
        if (MASK[i]) begin : g_black
          assign g[i] = g_lvl[l-1].g[i] | (g_lvl[l-1].p[i] & g_lvl[l-1].g[i - (1 << (l - 1))]);
          assign p[i] = g_lvl[l-1].p[i] & g_lvl[l-1].p[i - (1 << (l - 1))];
        end else begin : g_none
          assign g[i] = 1'b0;
          assign p[i] = 1'b0;
        end
      end
    end
  end

  // Grey cells: one per carry, each joining a group with a finished prefix
  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_grey
    logic c;
    if (i == 0) begin : g_first
      assign c = g_lvl[0].g[0];
    end else begin : g_join
      localparam int unsigned LV = mksa_level(i);
      assign c = g_lvl[LV].g[i] | (g_lvl[LV].p[i] & g_grey[i - (1 << LV)].c);
    end
    assign gc[i] = c;
  end

  // Post-processing
  assign sum  = p0 ^ {gc[WIDTH-2:0], cin};
  assign cout = gc[WIDTH-1];

endmodule

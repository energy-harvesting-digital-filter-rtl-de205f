// tsm_pkg: types and elaboration-time helpers shared by the two-speed
// radix-4 Booth multiplier and its modified Kogge-Stone adder.
//
// booth_digit_t is the one-hot-magnitude form of a radix-4 Booth digit
// (0, +-1, +-2): `one` selects the multiplicand, `two` selects it shifted left
// by one, `neg` asks for the two's complement.
//
// mksa_level() and mksa_black_mask() describe the prefix network of the
// modified Kogge-Stone adder (MKSA). Bit i (i >= 1) belongs to the segment
// [w/2, w) with w = 2^ceil(log2(i+1)). Its carry G[i:0] is formed by one grey
// cell that joins a power-of-two Kogge-Stone group G[i:i-2^l+1] with the
// already finished prefix G[i-2^l:0]. The level l is the largest one below the
// segment's level whose remaining prefix index i-2^l is at least
// max(1, w/2-2). Black cells are kept only where such a group needs them; the
// other Kogge-Stone black cells are dropped. For 8 bits this reproduces the
// network of the source figure exactly (black 7:6..3:2, 7:4, 6:3; grey 1:0,
// 3:0, 2:0, 7:0..4:0); the rule for wider adders is this design's own
// generalisation of that figure.
package tsm_pkg;

  typedef struct packed {
    logic neg;  // subtract: two's complement of the selected magnitude
    logic two;  // magnitude 2A
    logic one;  // magnitude A
  } booth_digit_t;

  // Widest adder the helpers below support.
  localparam int unsigned MKSA_MAXW = 256;
  localparam int unsigned MKSA_MAXL = 8;

  // Level of the group that bit i's grey cell combines (0 = the bit itself).
  function automatic int unsigned mksa_level(int unsigned i);
    int unsigned lg, w, thr;
    int unsigned lvl;
    lvl = 0;
    if (i >= 1) begin
      lg  = $clog2(i + 1);
      w   = 1 << lg;
      thr = (w / 2 > 3) ? (w / 2 - 2) : 1;
      for (int l = int'(lg) - 1; l >= 1; l--) begin
        if (lvl == 0 && i >= (1 << l) + thr) lvl = unsigned'(l);
      end
    end
    return lvl;
  endfunction

  // Bit i of the result is set when the adder of width w needs the black cell
  // that forms the Kogge-Stone group G[i:i-2^lev+1] (lev >= 1).
  function automatic logic [MKSA_MAXW-1:0] mksa_black_mask(int unsigned w, int unsigned lev);
    logic [MKSA_MAXW-1:0] m, up;
    up = '0;
    m  = '0;
    for (int l = MKSA_MAXL; l >= int'(lev); l--) begin
      m = '0;
      for (int i = 0; i < int'(w); i++) begin
        if (l >= 1 && mksa_level(unsigned'(i)) == unsigned'(l)) m[i] = 1'b1;
        if (l < int'(MKSA_MAXL)) begin
          if (up[i]) m[i] = 1'b1;
          if (i + (1 << l) < int'(w) && up[i + (1 << l)]) m[i] = 1'b1;
        end
      end
      up = m;
    end
    return m;
  endfunction

endpackage

// Reference models shared by the testbenches.
//
// RVT templates are drawn here as text, one string per template row:
// 'a' = +1, 'b' = +2, 'c' = -1, 'd' = -2, '.' = 0; the target pixel is row 5,
// column 5. Directions 8..15 are the negations of 0..7. This drawing is kept
// apart from the tap list of the RTL so that the two check each other.
// The template drawing is read from the document's filter drawing; the tie
// rule of the reference is this design's.
package tb_ref_pkg;

  localparam string TEMPLATE [8][11] = '{
    '{"...........", "...........", "...........", "..aaaaaaa..", "..bbbbbbb..", "...........", "..ddddddd..", "..ccccccc..", "...........", "...........", "..........."},
    '{"...........", "...........", "..aa.......", "..bbaaa....", "....bbbaa..", "..dd...bb..", "..ccddd....", "....cccdd..", ".......cc..", "...........", "..........."},
    '{"..a........", "..ba.......", "...ba......", "..d.ba.....", "..cd.ba....", "...cd.ba...", "....cd.ba..", ".....cd.b..", "......cd...", ".......cd..", "........c.."},
    '{"...........", "...........", "..cd.ba....", "..cd.ba....", "...cd.ba...", "...cd.ba...", "...cd.ba...", "....cd.ba..", "....cd.ba..", "...........", "..........."},
    '{"...........", "...........", "...cd.ba...", "...cd.ba...", "...cd.ba...", "...cd.ba...", "...cd.ba...", "...cd.ba...", "...cd.ba...", "...........", "..........."},
    '{"...........", "...........", "....cd.ba..", "....cd.ba..", "...cd.ba...", "...cd.ba...", "...cd.ba...", "..cd.ba....", "..cd.ba....", "...........", "..........."},
    '{"...........", "...........", "......cd.ba", ".....cd.ba.", "....cd.ba..", "...cd.ba...", "..cd.ba....", ".cd.ba.....", "cd.ba......", "...........", "..........."},
    '{"...........", "...........", ".......cc..", "....cccdd..", "..ccddd....", "..dd...bb..", "....bbbaa..", "..bbaaa....", "..aa.......", "...........", "..........."}
  };

  function automatic int coef(int d, int r, int c);
    case (TEMPLATE[d][r][c])
      "a": return 1;
      "b": return 2;
      "c": return -1;
      "d": return -2;
      default: return 0;
    endcase
  endfunction

  // Strongest of the 16 responses for a neighbourhood given as a function of
  // (row, col) offsets from the target, -5..5. Ties between directions go
  // to the lower base direction; label = d + 8 when the negated template wins.
  typedef struct { int label; int mag; } best_t;

  function automatic best_t rvt_best(int nb [11][11]);
    best_t b;
    b.label = 0;
    b.mag   = -1;
    for (int d = 0; d < 8; d++) begin
      int r = 0;
      for (int i = 0; i < 11; i++)
        for (int j = 0; j < 11; j++)
          r += coef(d, i, j) * nb[i][j];
      if ((r < 0 ? -r : r) > b.mag) begin
        b.mag   = r < 0 ? -r : r;
        b.label = r < 0 ? d + 8 : d;
      end
    end
    return b;
  endfunction

  // Parabolic peak-fit fraction, in units of 2^-frac_w, truncated to zero.
  function automatic longint parabolic_frac(longint a, longint c, longint b, int frac_w);
    longint num, den;
    num = (a - b) * (longint'(1) << frac_w);
    den = 2 * a - 4 * c + 2 * b;
    if (den == 0) return 0;
    return num / den;
  endfunction

endpackage

// hybrid_6b_mult: 6-bit sum-together array multiplier with mixed sub-words.
//
// Shows that the sum-together mapping is not tied to power-of-two sizes: a
// 6 x 6 signed Baugh-Wooley array whose operands can be cut into sub-words
// of different widths. Weight x and activation y are cut the same way, and
// only the partial-product blocks on one anti-diagonal are kept, so the
// array adds their products in place:
//   mode 0  one 6 x 6 product                          p = x * y
//   mode 1  two 3-bit sub-words                        p = (x0*y1 + x1*y0) << 3
//   mode 2  three 2-bit sub-words                      p = (x0*y2 + x1*y1 + x2*y0) << 4
//   mode 3  asymmetric: bits [1:0] and [5:2]           p = (x0*y1 + x1*y0) << 2
//           (two 2-bit x 4-bit products)
// Every sub-word is a signed two's-complement number; p is 12 bits, signed.
// The one-, two- and three-way decompositions and the asymmetric 2-bit/4-bit
// one are those of the published 6-bit example; the exact cut used for the
// asymmetric mode and the mode encoding are this implementation's choices.
// Inverted (NAND) partial products mark the terms with exactly one sign bit
// inside each active block, and a per-mode constant completes the
// two's-complement correction: for an a x b block it is
// -(2^(b-1)-1)*2^(a-1) - (2^(a-1)-1)*2^(b-1), at the block's weight.
//
// Purely combinational.
module hybrid_6b_mult (
  input  logic [1:0]  mode,
  input  logic [5:0]  x,
  input  logic [5:0]  y,
  output logic [11:0] p
);

  localparam int unsigned W  = 6;
  localparam int unsigned PW = 12;

  typedef logic [W-1:0][W-1:0] ppmask_t;   // [row j][column i]

  // Sub-word index of operand bit b in mode md.
  function automatic int unsigned sub_idx(logic [1:0] md, int unsigned b);
    case (md)
      2'd0:    return 0;
      2'd1:    return b / 3;
      2'd2:    return b / 2;
      default: return (b < 2) ? 0 : 1;
    endcase
  endfunction

  // Is bit b the sign bit of its sub-word?
  function automatic logic is_sign(logic [1:0] md, int unsigned b);
    case (md)
      2'd0:    return b == 5;
      2'd1:    return (b % 3) == 2;
      2'd2:    return (b % 2) == 1;
      default: return b == 1 || b == 5;
    endcase
  endfunction

  // Number of sub-words per operand.
  function automatic int unsigned n_sub(logic [1:0] md);
    case (md)
      2'd0:    return 1;
      2'd1:    return 2;
      2'd2:    return 3;
      default: return 2;
    endcase
  endfunction

  function automatic ppmask_t mk_active(logic [1:0] md);
    ppmask_t r;
    for (int unsigned j = 0; j < W; j++)
      for (int unsigned i = 0; i < W; i++)
        r[j][i] = (sub_idx(md, i) + sub_idx(md, j)) == n_sub(md) - 1;
    return r;
  endfunction

  function automatic ppmask_t mk_invert(logic [1:0] md);
    ppmask_t r;
    for (int unsigned j = 0; j < W; j++)
      for (int unsigned i = 0; i < W; i++)
        r[j][i] = is_sign(md, i) != is_sign(md, j);
    return r;
  endfunction

  // Baugh-Wooley constant: sum over the active blocks.
  function automatic logic [PW-1:0] mk_const(logic [1:0] md);
    logic [PW-1:0] r;
    r = '0;
    for (int unsigned a = 0; a < n_sub(md); a++) begin
      int unsigned lo_x, wx, lo_y, wy;
      lo_x = 0; wx = 0; lo_y = 0; wy = 0;
      // Bit range of x sub-word a and of y sub-word n_sub-1-a.
      for (int unsigned b = W; b > 0; b--) if (sub_idx(md, b - 1) == a) lo_x = b - 1;
      for (int unsigned b = 0; b < W; b++) if (sub_idx(md, b) == a) wx++;
      for (int unsigned b = W; b > 0; b--) if (sub_idx(md, b - 1) == n_sub(md) - 1 - a) lo_y = b - 1;
      for (int unsigned b = 0; b < W; b++) if (sub_idx(md, b) == n_sub(md) - 1 - a) wy++;
      r = r - ((((PW'(1) << (wy - 1)) - 1) << (wx - 1)) << (lo_x + lo_y))
            - ((((PW'(1) << (wx - 1)) - 1) << (wy - 1)) << (lo_x + lo_y));
    end
    return r;
  endfunction

  ppmask_t       act, inv;
  logic [PW-1:0] cst;

  always_comb begin
    case (mode)
      2'd0:    begin act = mk_active(2'd0); inv = mk_invert(2'd0); cst = mk_const(2'd0); end
      2'd1:    begin act = mk_active(2'd1); inv = mk_invert(2'd1); cst = mk_const(2'd1); end
      2'd2:    begin act = mk_active(2'd2); inv = mk_invert(2'd2); cst = mk_const(2'd2); end
      default: begin act = mk_active(2'd3); inv = mk_invert(2'd3); cst = mk_const(2'd3); end
    endcase
  end

  // Rows of gated partial products, added one after the other.
  logic [W-1:0][PW-1:0] row;
  logic [W:0][PW-1:0]   sum;

  always_comb begin
    for (int unsigned j = 0; j < W; j++) begin
      row[j] = '0;
      for (int unsigned i = 0; i < W; i++)
        row[j][i + j] = act[j][i] & ((x[i] & y[j]) ^ inv[j][i]);
    end
  end

  assign sum[0] = cst;
  for (genvar j = 0; j < W; j++) begin : g_row
    assign sum[j + 1] = sum[j] + row[j];
  end

  assign p = sum[W];

endmodule

// sbw_mult: sub-word parallel, precision-scalable signed array multiplier.
//
// A 16 x 16 two's-complement Baugh-Wooley array multiplier whose partial
// product array can be split at run time into 16/m x 16/m blocks of m x m
// bits (m = 16, 8, 4 or 2, chosen by `prec`). Block (a, b) multiplies
// weight sub-word x[a] with activation sub-word y[b]. Which blocks stay
// active depends on how the multiplier is configured:
//
//   SUM_TOGETHER = 0  (Sum Separate, SS): only the diagonal blocks a == b are
//     active. Each one lands in its own 2m-bit field of `p`, and the carry
//     paths between fields are broken, so
//       p[2m*a +: 2m] = x[a] * y[a]            (signed, for each a)
//   SUM_TOGETHER = 1  (Sum Together, ST): only the anti-diagonal blocks
//     a + b == 16/m - 1 are active. All of them land on the same columns,
//     starting at bit m*(16/m - 1), so the array itself adds them:
//       p = ( sum_a x[a] * y[16/m-1-a] ) << m*(16/m - 1)   (signed, 32 bits)
//   In 16-bit mode both configurations are the ordinary full multiplier.
//
// Every inactive partial product is gated to zero. In each active block the
// partial products with exactly one sign bit are inverted (NAND instead of
// AND), as in a Baugh-Wooley array, and a per-mode constant row
// (2^m - 2^(2m-1) per active block, placed at the block's weight) finishes
// the two's-complement correction. The rows are added one after the other,
// as in an array multiplier, with an adder whose carry into a field boundary
// is killed in SS mode. The partitioning into diagonal (SS) and
// anti-diagonal (ST) blocks and the broken carry paths follow the published
// design; the bit-level form of the correction constants is derived here.
//
// Purely combinational; no clock. Interface: prec (psmac_pkg::prec_t),
// x, y (16-bit packed sub-words, sub-word 0 in the least significant bits),
// p (32 bits).
module sbw_mult
  import psmac_pkg::*;
#(
  parameter bit SUM_TOGETHER = 1'b0
) (
  input  prec_t        prec,
  input  logic [15:0]  x,
  input  logic [15:0]  y,
  output logic [31:0]  p
);

  localparam int unsigned W  = MAX_PREC;
  localparam int unsigned PW = 2 * MAX_PREC;

  typedef logic [W-1:0][W-1:0] ppmask_t;   // [row j][column i]

  // Is partial product x[i]*y[j] inside an active block in mode md?
  function automatic logic pp_active(prec_t md, int unsigned i, int unsigned j);
    int unsigned m, k, bi, bj;
    m  = sub_width(md);
    k  = W / m;
    bi = i / m;
    bj = j / m;
    if (SUM_TOGETHER) return (bi + bj) == (k - 1);
    else              return bi == bj;
  endfunction

  // Is x[i]*y[j] a Baugh-Wooley inverted term (exactly one sign bit)?
  function automatic logic pp_invert(prec_t md, int unsigned i, int unsigned j);
    int unsigned m;
    m = sub_width(md);
    return ((i % m) == m - 1) != ((j % m) == m - 1);
  endfunction

  function automatic ppmask_t mk_active(prec_t md);
    ppmask_t r;
    for (int unsigned j = 0; j < W; j++)
      for (int unsigned i = 0; i < W; i++)
        r[j][i] = pp_active(md, i, j);
    return r;
  endfunction

  function automatic ppmask_t mk_invert(prec_t md);
    ppmask_t r;
    for (int unsigned j = 0; j < W; j++)
      for (int unsigned i = 0; i < W; i++)
        r[j][i] = pp_invert(md, i, j);
    return r;
  endfunction

  // Correction constant: 2^m - 2^(2m-1) per active block, at the block's
  // weight. In SS mode each field keeps it modulo 2^(2m).
  function automatic logic [PW-1:0] mk_const(prec_t md);
    int unsigned       m, k;
    logic [PW-1:0]     r;
    logic [PW-1:0]     blk;
    m   = sub_width(md);
    k   = W / m;
    blk = (PW'(1) << m) - (PW'(1) << (2 * m - 1));
    r   = '0;
    if (SUM_TOGETHER) begin
      for (int unsigned a = 0; a < k; a++) r = r + (blk << (m * (k - 1)));
    end else begin
      for (int unsigned a = 0; a < k; a++) begin
        logic [PW-1:0] fmask;
        fmask = (2 * m >= PW) ? '1 : ((PW'(1) << (2 * m)) - 1);
        r = r | ((blk & fmask) << (2 * m * a));
      end
    end
    return r;
  endfunction

  // Carry-kill positions: bit b set means no carry enters column b.
  function automatic logic [PW-1:0] mk_kill(prec_t md);
    int unsigned   m;
    logic [PW-1:0] r;
    m = sub_width(md);
    r = '0;
    if (!SUM_TOGETHER)
      for (int unsigned b = 1; b < PW; b++) r[b] = (b % (2 * m)) == 0;
    return r;
  endfunction

  localparam ppmask_t ACT16 = mk_active(PREC16);
  localparam ppmask_t ACT8  = mk_active(PREC8);
  localparam ppmask_t ACT4  = mk_active(PREC4);
  localparam ppmask_t ACT2  = mk_active(PREC2);
  localparam ppmask_t INV16 = mk_invert(PREC16);
  localparam ppmask_t INV8  = mk_invert(PREC8);
  localparam ppmask_t INV4  = mk_invert(PREC4);
  localparam ppmask_t INV2  = mk_invert(PREC2);
  localparam logic [PW-1:0] CST16 = mk_const(PREC16);
  localparam logic [PW-1:0] CST8  = mk_const(PREC8);
  localparam logic [PW-1:0] CST4  = mk_const(PREC4);
  localparam logic [PW-1:0] CST2  = mk_const(PREC2);
  localparam logic [PW-1:0] KIL16 = mk_kill(PREC16);
  localparam logic [PW-1:0] KIL8  = mk_kill(PREC8);
  localparam logic [PW-1:0] KIL4  = mk_kill(PREC4);
  localparam logic [PW-1:0] KIL2  = mk_kill(PREC2);

  // Adder with carries broken at the positions set in `brk`.
  function automatic logic [PW-1:0] row_add(logic [PW-1:0] a, logic [PW-1:0] b,
                                            logic [PW-1:0] brk);
    logic [PW-1:0] s;
    logic          c;
    c = 1'b0;
    for (int unsigned n = 0; n < PW; n++) begin
      if (brk[n]) c = 1'b0;
      s[n] = a[n] ^ b[n] ^ c;
      c    = (a[n] & b[n]) | (c & (a[n] ^ b[n]));
    end
    return s;
  endfunction

  ppmask_t       act, inv;
  logic [PW-1:0] cst, kill;

  always_comb begin
    case (prec)
      PREC16:  begin act = ACT16; inv = INV16; cst = CST16; kill = KIL16; end
      PREC8:   begin act = ACT8;  inv = INV8;  cst = CST8;  kill = KIL8;  end
      PREC4:   begin act = ACT4;  inv = INV4;  cst = CST4;  kill = KIL4;  end
      default: begin act = ACT2;  inv = INV2;  cst = CST2;  kill = KIL2;  end
    endcase
  end

  // Partial-product rows, row j shifted by j, then the array of row adders.
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
    assign sum[j + 1] = row_add(sum[j], row[j], kill);
  end

  assign p = sum[W];

endmodule

// psmac_pkg: types and constants shared by the precision-scalable MAC engines.
//
// The engines are built around one 16-bit signed Baugh-Wooley array
// multiplier that can be split at run time into 16/m sub-words of m bits,
// m in {16, 8, 4, 2}. This package holds the precision-mode encoding and the
// small helper functions (sub-word width, lane count, accumulator field
// layout) that every module needs to agree on. The 16-bit maximum precision,
// the 32-bit activation bus, the 256-bit weight bus, the 16 multipliers and
// the 10-bit accumulation headroom are the numbers of the published design;
// the 2-bit mode encoding is this implementation's own choice.
package psmac_pkg;

  // Maximum operand precision of one multiplier.
  localparam int unsigned MAX_PREC = 16;
  // Activation bus (two 16-bit halves) and weight bus (16 x 16 bits).
  localparam int unsigned ACT_BUS  = 32;
  localparam int unsigned WGT_BUS  = 256;
  // Accumulation headroom per result, in bits.
  localparam int unsigned MARGIN   = 10;

  // Accumulation register of one SS PE: 8 fields of 2*2+10 bits in 2-bit
  // mode, the widest case (8 x 14 = 112 bits).
  localparam int unsigned SS_ACC_W = (MAX_PREC / 2) * (2 * 2 + MARGIN);
  // Accumulation register of one ST output: 32-bit product + headroom.
  localparam int unsigned ST_ACC_W = 2 * MAX_PREC + MARGIN;

  // Run-time precision mode.
  typedef enum logic [1:0] {
    PREC16 = 2'd0,
    PREC8  = 2'd1,
    PREC4  = 2'd2,
    PREC2  = 2'd3
  } prec_t;

  // Sub-word width m of a mode.
  function automatic int unsigned sub_width(prec_t p);
    case (p)
      PREC16:  return 16;
      PREC8:   return 8;
      PREC4:   return 4;
      default: return 2;
    endcase
  endfunction

  // Number of sub-words 16/m in a 16-bit operand.
  function automatic int unsigned lanes(prec_t p);
    return MAX_PREC / sub_width(p);
  endfunction

  // Width of one SS accumulator field: a 2m-bit product plus headroom.
  function automatic int unsigned ss_field_width(prec_t p);
    return 2 * sub_width(p) + MARGIN;
  endfunction

endpackage

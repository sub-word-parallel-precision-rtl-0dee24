// st_pe: Sum Together processing pair.
//
// Two ST-configured sbw_mult instances work in tandem on one output: the
// "lo" multiplier on the bottom 16 bits of the activation word and its
// weights, the "hi" multiplier on the top 16 bits. Each delivers the sum of
// its 16/m sub-word products, placed at bit m*(16/m - 1) of its 32-bit
// output; an arithmetic right shift by that amount (0, 8, 12 or 14 bits)
// recovers the signed sum. The two sums are added and accumulated in a
// 42-bit register (32-bit product + 10 bits of headroom). The tandem pair,
// the adder and the 42-bit register are the published design; the shift
// that aligns the multiplier output is implied by its bit placement.
//
// Operand order: the multiplier pairs x sub-word a with y sub-word
// 16/m-1-a, so y must be given with its sub-words in reverse order (the
// engine does this once for all pairs).
//
// Timing: one beat per cycle with en = 1; clear = 1 loads instead of adding.
// The accumulated value is in `acc` one cycle after the last beat.
// Synchronous active-low reset clears it.
module st_pe
  import psmac_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  prec_t                prec,
  input  logic                 en,
  input  logic                 clear,
  input  logic [15:0]          x_lo,
  input  logic [15:0]          y_lo,
  input  logic [15:0]          x_hi,
  input  logic [15:0]          y_hi,
  output logic [ST_ACC_W-1:0]  acc
);

  logic [31:0]        p_lo, p_hi;
  logic signed [31:0] s_lo, s_hi;
  logic signed [32:0] pair_sum;

  sbw_mult #(.SUM_TOGETHER(1'b1)) u_mult_lo (.prec(prec), .x(x_lo), .y(y_lo), .p(p_lo));
  sbw_mult #(.SUM_TOGETHER(1'b1)) u_mult_hi (.prec(prec), .x(x_hi), .y(y_hi), .p(p_hi));

  // Align the in-array sum to bit 0.
  always_comb begin
    case (prec)
      PREC16:  begin s_lo = signed'(p_lo);        s_hi = signed'(p_hi);        end
      PREC8:   begin s_lo = signed'(p_lo) >>> 8;  s_hi = signed'(p_hi) >>> 8;  end
      PREC4:   begin s_lo = signed'(p_lo) >>> 12; s_hi = signed'(p_hi) >>> 12; end
      default: begin s_lo = signed'(p_lo) >>> 14; s_hi = signed'(p_hi) >>> 14; end
    endcase
  end

  assign pair_sum = 33'(s_lo) + 33'(s_hi);

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= (clear ? '0 : acc) + ST_ACC_W'(pair_sum);
  end

endmodule

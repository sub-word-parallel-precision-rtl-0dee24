// tb_hybrid_6b_mult: exhaustive self-checking test of the 6-bit
// sum-together multiplier.
//
// Applies all 64 x 64 operand pairs in each of the four modes and compares
// the 12-bit output with the sum of signed sub-word products computed here
// from the sub-word cut of each mode, shifted to the weight where the array
// places it.
module tb_hybrid_6b_mult;

  logic [1:0]  mode;
  logic [5:0]  x, y;
  logic [11:0] p;
  logic        clk;
  int          checks, failures;

  hybrid_6b_mult dut (.mode(mode), .x(x), .y(y), .p(p));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Signed value of bits [lo +: w] of v.
  function automatic int field(logic [5:0] v, int lo, int w);
    int r;
    r = 0;
    for (int b = 0; b < w; b++) r += int'(v[lo + b]) << b;
    if (v[lo + w - 1]) r -= (1 << w);
    return r;
  endfunction

  function automatic int expect_p(logic [1:0] md, logic [5:0] a, logic [5:0] b);
    case (md)
      2'd0:    return field(a, 0, 6) * field(b, 0, 6);
      2'd1:    return (field(a, 0, 3) * field(b, 3, 3) + field(a, 3, 3) * field(b, 0, 3)) * 8;
      2'd2:    return (field(a, 0, 2) * field(b, 4, 2) + field(a, 2, 2) * field(b, 2, 2)
                     + field(a, 4, 2) * field(b, 0, 2)) * 16;
      default: return (field(a, 0, 2) * field(b, 2, 4) + field(a, 2, 4) * field(b, 0, 2)) * 4;
    endcase
  endfunction

  initial begin
    int e;
    checks = 0;
    failures = 0;
    for (int md = 0; md < 4; md++) begin
      for (int a = 0; a < 64; a++) begin
        for (int b = 0; b < 64; b++) begin
          mode = 2'(md);
          x    = 6'(a);
          y    = 6'(b);
          #1;
          e = expect_p(mode, x, y);
          checks++;
          if (p !== 12'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL mode %0d x=%h y=%h got %h exp %h", md, x, y, p, 12'(e));
          end
        end
      end
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

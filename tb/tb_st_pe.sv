// tb_st_pe: self-checking test of the Sum Together processing pair.
//
// Feeds the pair runs of random operand words in each precision mode, plus
// runs of extreme operands that push the 42-bit accumulator toward its
// headroom, with `clear` on the first beat and random idle cycles. The
// expected value is computed here as the sum over both multipliers of
// x[a] * y[16/m-1-a] for every sub-word a (the anti-diagonal pairing of a
// sum-together multiplier), accumulated over the run.
module tb_st_pe;
  import psmac_pkg::*;

  logic                clk, rst_n, en, clear;
  prec_t               prec;
  logic [15:0]         x_lo, y_lo, x_hi, y_hi;
  logic [ST_ACC_W-1:0] acc;
  int                  checks, failures;
  longint              ref_acc;

  st_pe dut (.clk(clk), .rst_n(rst_n), .prec(prec), .en(en), .clear(clear),
             .x_lo(x_lo), .y_lo(y_lo), .x_hi(x_hi), .y_hi(y_hi), .acc(acc));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sub_val(logic [15:0] v, int m, int a);
    longint r;
    r = 0;
    for (int b = 0; b < m; b++) r[b] = v[a * m + b];
    if (v[a * m + m - 1]) r = r - (longint'(1) << m);
    return r;
  endfunction

  function automatic longint st_dot(logic [15:0] x, logic [15:0] y, int m);
    longint s;
    int     k;
    k = 16 / m;
    s = 0;
    for (int a = 0; a < k; a++) s += sub_val(x, m, a) * sub_val(y, m, k - 1 - a);
    return s;
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  function automatic logic [15:0] most_neg(int m);
    logic [15:0] v;
    v = '0;
    for (int a = 0; a < 16 / m; a++) v[a*m + m - 1] = 1'b1;
    return v;
  endfunction

  task automatic run(prec_t md, int len, bit extreme);
    int m;
    longint got;
    m = int'(sub_width(md));
    prec = md;
    ref_acc = 0;
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      while (($urandom % 5) == 0) begin
        en = 1'b0; x_lo = 16'($urandom); x_hi = 16'($urandom);
        @(negedge clk);
      end
      en    = 1'b1;
      clear = (n == 0);
      if (extreme) begin
        x_lo = most_neg(m); y_lo = most_neg(m); x_hi = most_neg(m); y_hi = most_neg(m);
      end else begin
        x_lo = 16'($urandom); y_lo = 16'($urandom); x_hi = 16'($urandom); y_hi = 16'($urandom);
      end
      ref_acc += st_dot(x_lo, y_lo, m) + st_dot(x_hi, y_hi, m);
    end
    @(negedge clk);
    en = 1'b0;
    got = 0;
    for (int b = 0; b < int'(ST_ACC_W); b++) got[b] = acc[b];
    if (got[ST_ACC_W-1]) got -= (longint'(1) << ST_ACC_W);
    check(got == ref_acc, $sformatf("m=%0d len=%0d got %0d exp %0d", m, len, got, ref_acc));
  endtask

  initial begin
    checks = 0; failures = 0;
    rst_n = 1'b0; en = 1'b0; clear = 1'b0; prec = PREC16;
    x_lo = '0; y_lo = '0; x_hi = '0; y_hi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 4; md++) begin
      run(prec_t'(md), 1, 1'b0);
      for (int r = 0; r < 20; r++) run(prec_t'(md), 1 + int'($urandom % 40), 1'b0);
      run(prec_t'(md), 500, 1'b1);
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

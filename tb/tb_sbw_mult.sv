// tb_sbw_mult: self-checking test of the sub-word parallel multiplier.
//
// Instantiates one multiplier configured Sum Separate and one configured Sum
// Together, drives both with the same operands in all four precision modes
// (corner operands first, then random ones) and compares against products
// computed here from the signed sub-words: for SS every 2m-bit field must
// hold its own product, for ST the whole word must equal the anti-diagonal
// sum of products shifted to bit m*(16/m-1).
module tb_sbw_mult;
  import psmac_pkg::*;

  prec_t        prec;
  logic [15:0]  x, y;
  logic [31:0]  p_ss, p_st;
  int           checks, failures;
  logic         clk;

  sbw_mult #(.SUM_TOGETHER(1'b0)) u_ss (.prec(prec), .x(x), .y(y), .p(p_ss));
  sbw_mult #(.SUM_TOGETHER(1'b1)) u_st (.prec(prec), .x(x), .y(y), .p(p_st));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Watchdog.
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

  function automatic int check_one();
    int          bad;
    int          m, k;
    logic [31:0] exp_ss, exp_st;
    longint      acc, pr;
    m = int'(sub_width(prec));
    k = 16 / m;
    exp_ss = '0;
    acc    = 0;
    for (int a = 0; a < k; a++) begin
      pr = sub_val(x, m, a) * sub_val(y, m, a);
      for (int b = 0; b < 2 * m; b++) exp_ss[2 * m * a + b] = pr[b];
      acc += sub_val(x, m, a) * sub_val(y, m, k - 1 - a);
    end
    acc    = acc <<< (m * (k - 1));
    exp_st = acc[31:0];
    bad = 0;
    if (p_ss !== exp_ss) begin
      bad++;
      if (failures < 10)
        $display("SS mismatch m=%0d x=%h y=%h got %h exp %h", m, x, y, p_ss, exp_ss);
    end
    if (p_st !== exp_st) begin
      bad++;
      if (failures < 10)
        $display("ST mismatch m=%0d x=%h y=%h got %h exp %h", m, x, y, p_st, exp_st);
    end
    return bad;
  endfunction

  localparam logic [5:0][15:0] CORNERS =
    {16'h0000, 16'hFFFF, 16'h8000, 16'h7FFF, 16'hAAAA, 16'h5555};

  initial begin
    checks   = 0;
    failures = 0;
    for (int md = 0; md < 4; md++) begin
      prec = prec_t'(md);
      for (int ca = 0; ca < 6; ca++) begin
        for (int cb = 0; cb < 6; cb++) begin
          x = CORNERS[ca];
          y = CORNERS[cb];
          #1 failures += check_one();
          checks += 2;
        end
      end
      for (int n = 0; n < 2000; n++) begin
        x = 16'($urandom);
        y = 16'($urandom);
        #1 failures += check_one();
          checks += 2;
      end
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

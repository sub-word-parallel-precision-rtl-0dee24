// tb_ss_pe: self-checking test of the Sum Separate processing element.
//
// Feeds the PE runs of random weight/activation words in each precision
// mode, with the first beat of every run marked `clear` and random idle
// cycles (en low) in between. After each run every 2m+10-bit field of the
// accumulator must equal the sum of the products of its own sub-word pair,
// computed here, and the bits above the last field must be zero. Runs are
// long enough (up to 1000 beats of extreme values) to exercise the 10-bit
// headroom, and the extreme operands check that no carry leaks between
// fields.
module tb_ss_pe;
  import psmac_pkg::*;

  logic                clk, rst_n, en, clear;
  prec_t               prec;
  logic [15:0]         x, y;
  logic [SS_ACC_W-1:0] acc;
  int                  checks, failures;
  longint              ref_f [8];

  ss_pe dut (.clk(clk), .rst_n(rst_n), .prec(prec), .en(en), .clear(clear),
             .x(x), .y(y), .acc(acc));

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

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  // mode: 0 random, 1 all most-negative, 2 max positive x most negative
  task automatic run(prec_t md, int len, int kind);
    int m, k, fw;
    m  = int'(sub_width(md));
    k  = 16 / m;
    fw = 2 * m + int'(MARGIN);
    prec = md;
    for (int f = 0; f < 8; f++) ref_f[f] = 0;
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      while (($urandom % 5) == 0) begin
        en = 1'b0; x = 16'($urandom); y = 16'($urandom);
        @(negedge clk);
      end
      en    = 1'b1;
      clear = (n == 0);
      case (kind)
        1:       begin x = '0; y = '0; for (int a = 0; a < k; a++) begin x[a*m+m-1] = 1'b1; y[a*m+m-1] = 1'b1; end end
        2:       begin x = '0; y = '0; for (int a = 0; a < k; a++) begin x[a*m +: 16] = '1; x[a*m+m-1] = 1'b0; y[a*m+m-1] = 1'b1; end end
        default: begin x = 16'($urandom); y = 16'($urandom); end
      endcase
      for (int a = 0; a < k; a++) ref_f[a] += sub_val(x, m, a) * sub_val(y, m, a);
    end
    @(negedge clk);
    en = 1'b0;
    for (int a = 0; a < k; a++) begin
      longint got;
      got = 0;
      for (int b = 0; b < fw; b++) got[b] = acc[a*fw + b];
      if (got[fw-1]) got -= (longint'(1) << fw);
      check(got == ref_f[a], $sformatf("m=%0d kind=%0d field %0d got %0d exp %0d",
                                       m, kind, a, got, ref_f[a]));
    end
    if (k * fw < int'(SS_ACC_W))
      check((acc >> (k * fw)) == '0, "bits above last field zero");
  endtask

  initial begin
    checks = 0; failures = 0;
    rst_n = 1'b0; en = 1'b0; clear = 1'b0; x = '0; y = '0; prec = PREC16;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 4; md++) begin
      run(prec_t'(md), 1, 0);
      run(prec_t'(md), 37, 0);
      run(prec_t'(md), 1000, 1);
      run(prec_t'(md), 1000, 2);
      run(prec_t'(md), 200, 0);
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_circ_act_buffer: self-checking test of the circular activation buffer.
//
// For each precision mode, loads random 32-bit words and checks that on the
// load cycle the view is the new word itself (bypass) and that after t
// rotations the view is the word rotated right by t*m bits, i.e. position i
// holds activation (i + t) mod 32/m. Cycles with adv low must hold the view,
// and after 32/m rotations the word must be back where it started.
module tb_circ_act_buffer;
  import psmac_pkg::*;

  logic        clk, rst_n, load, adv;
  prec_t       prec;
  logic [31:0] a_in, view;
  int          checks, failures;

  circ_act_buffer dut (.clk(clk), .rst_n(rst_n), .prec(prec), .load(load), .adv(adv),
                       .a_in(a_in), .view(view));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  function automatic logic [31:0] rotr(logic [31:0] v, int s);
    logic [63:0] d;
    d = {v, v} >> (s % 32);
    return d[31:0];
  endfunction

  initial begin
    logic [31:0] word;
    int m, t;
    checks = 0; failures = 0;
    rst_n = 1'b0; load = 1'b0; adv = 1'b0; a_in = '0; prec = PREC16;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 4; md++) begin
      prec = prec_t'(md);
      m    = int'(sub_width(prec));
      for (int w = 0; w < 10; w++) begin
        word = $urandom;
        @(negedge clk);
        load = 1'b1; adv = 1'b1; a_in = word;
        #1 check(view == word, "bypass view on load");
        t = 1;
        @(negedge clk);
        load = 1'b0;
        a_in = $urandom;
        while (t < 32 / m) begin
          adv = ($urandom % 3) != 0;
          #1 check(view == rotr(word, t * m),
                   $sformatf("m=%0d t=%0d view %h exp %h", m, t, view, rotr(word, t * m)));
          @(negedge clk);
          if (adv) t++;
        end
        adv = 1'b0;
        #1 check(view == word, "full turn restores the word");
      end
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

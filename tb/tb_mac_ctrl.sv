// tb_mac_ctrl: self-checking test of the tile sequencer.
//
// Instantiates the controller in both configurations (Sum Separate and Sum
// Together) and runs tiles of several lengths in every precision mode with
// random stalls. Checks the number of beats per tile against the nominal rate
// (N for SS, N/(32/m) for ST), that `first` marks only the first beat, that
// SS requests a new activation word exactly every 32/m beats and ST on every
// beat, that out_valid pulses once, one cycle after the last beat, that
// start is ignored while busy, and that a new tile can start in the
// out_valid cycle.
module tb_mac_ctrl;
  import psmac_pkg::*;

  logic        clk, rst_n, start, in_valid;
  prec_t       prec_in;
  logic [15:0] n_elems;
  prec_t       prec [2];
  logic        busy [2], beat [2], first [2], a_req [2], out_valid [2];
  int          checks, failures;

  mac_ctrl #(.SUM_TOGETHER(1'b0)) u_ss (
    .clk(clk), .rst_n(rst_n), .start(start), .prec_in(prec_in), .n_elems(n_elems),
    .in_valid(in_valid), .prec(prec[0]), .busy(busy[0]), .beat(beat[0]),
    .first(first[0]), .a_req(a_req[0]), .out_valid(out_valid[0]));
  mac_ctrl #(.SUM_TOGETHER(1'b1)) u_st (
    .clk(clk), .rst_n(rst_n), .start(start), .prec_in(prec_in), .n_elems(n_elems),
    .in_valid(in_valid), .prec(prec[1]), .busy(busy[1]), .beat(beat[1]),
    .first(first[1]), .a_req(a_req[1]), .out_valid(out_valid[1]));

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

  // Run one tile on both controllers at once; they finish at different times.
  task automatic run(prec_t md, int n);
    int m, nw, exp_beats [2], nbeats [2], nvalid [2], done;
    m  = int'(sub_width(md));
    nw = 32 / m;
    exp_beats[0] = n;
    exp_beats[1] = n / nw;
    nbeats = '{0, 0};
    nvalid = '{0, 0};
    @(negedge clk);
    start = 1'b1; prec_in = md; n_elems = 16'(n);
    @(negedge clk);
    start = 1'b0;
    check(prec[0] == md && prec[1] == md, "mode latched");
    done = 0;
    while (done < 2) begin
      in_valid = ($urandom % 4) != 0;
      // A start while busy must be ignored.
      start    = busy[0] && busy[1] && (($urandom % 8) == 0);
      n_elems  = 16'(nw);
      #1;
      for (int c = 0; c < 2; c++) begin
        if (busy[c] && in_valid) begin
          check(beat[c], "beat when busy and valid");
          check(first[c] == (nbeats[c] == 0), "first only on beat 0");
          if (c == 0) check(a_req[c] == ((nbeats[c] % nw) == 0), "SS a_req every 32/m beats");
          else        check(a_req[c], "ST a_req every beat");
          nbeats[c]++;
        end else begin
          check(!beat[c], "no beat when idle or stalled");
        end
      end
      @(negedge clk);
      start = 1'b0;
      for (int c = 0; c < 2; c++) begin
        if (out_valid[c]) begin
          nvalid[c]++;
          done++;
          check(!busy[c], "idle with out_valid");
        end
      end
    end
    in_valid = 1'b0;
    check(nbeats[0] == exp_beats[0] && nbeats[1] == exp_beats[1], "beats per tile");
  endtask

  // Count beats with a monitor so the counting does not depend on the driver.
  int mon_beats [2];
  int mon_valid [2];
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (beat[c]) mon_beats[c]++;
      if (out_valid[c]) mon_valid[c]++;
    end
  end

  initial begin
    int nw, b0 [2], v0 [2];
    checks = 0; failures = 0;
    mon_beats = '{0, 0}; mon_valid = '{0, 0};
    rst_n = 1'b0; start = 1'b0; in_valid = 1'b0; prec_in = PREC16; n_elems = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 4; md++) begin
      nw = 32 / int'(sub_width(prec_t'(md)));
      for (int mult = 1; mult <= 3; mult++) begin
        b0 = mon_beats; v0 = mon_valid;
        run(prec_t'(md), nw * mult);
        @(negedge clk);
        check(mon_beats[0] - b0[0] == nw * mult, $sformatf("SS beats m-mode %0d", md));
        check(mon_beats[1] - b0[1] == mult, $sformatf("ST beats m-mode %0d", md));
        check(mon_valid[0] - v0[0] == 1 && mon_valid[1] - v0[1] == 1, "one out_valid each");
      end
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

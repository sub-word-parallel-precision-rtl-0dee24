// tb_st_engine: self-checking test of the Sum Together engine.
//
// Runs complete matrix-vector tiles in all four precision modes with random
// signed m-bit weights and activations, random stall cycles (in_valid low,
// data buses filled with junk) and consecutive tiles. Both streams are laid
// out linearly: beat b carries elements b*32/m .. b*32/m+32/m-1 of the
// activation vector, and of row q in w_data[32q +: 32]. Each tile checks the
// 8 outputs against dot products computed here, the beat count
// (N / (32/m) beats per tile, the nominal rate), that a new activation word is
// requested on every beat and that out_valid comes exactly one cycle after
// the last beat.
module tb_st_engine;
  import psmac_pkg::*;

  localparam int NPR  = 8;
  localparam int NMAX = 256;

  logic                      clk, rst_n;
  logic                      start, in_valid;
  prec_t                     prec_in, prec;
  logic [15:0]               n_elems;
  logic [ACT_BUS-1:0]        a_data;
  logic [32*NPR-1:0]         w_data;
  logic                      busy, a_req, out_valid;
  logic [NPR-1:0][ST_ACC_W-1:0] acc;

  int checks, failures;
  int wmat [NPR][NMAX];
  int avec [NMAX];

  st_engine #(.N_PAIR(NPR)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .prec_in(prec_in), .n_elems(n_elems),
    .in_valid(in_valid), .a_data(a_data), .w_data(w_data), .busy(busy),
    .a_req(a_req), .prec(prec), .out_valid(out_valid), .acc(acc)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rand_sub(int m);
    int v;
    v = int'($urandom % (1 << m));
    if (v >= (1 << (m - 1))) v -= (1 << m);
    return v;
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  task automatic run_tile(prec_t md, int n, bit stalls);
    int m, nw, b, beats, nbeats;
    m      = int'(sub_width(md));
    nw     = 32 / m;
    nbeats = n / nw;
    for (int r = 0; r < NPR; r++)
      for (int e = 0; e < n; e++) wmat[r][e] = rand_sub(m);
    for (int e = 0; e < n; e++) avec[e] = rand_sub(m);

    @(negedge clk);
    start   = 1'b1;
    prec_in = md;
    n_elems = 16'(n);
    @(negedge clk);
    start   = 1'b0;
    check(busy == 1'b1, "busy after start");
    b     = 0;
    beats = 0;
    while (b < nbeats) begin
      bit v;
      v = stalls ? (($urandom % 4) != 0) : 1'b1;
      in_valid = v;
      a_data   = $urandom;
      for (int w = 0; w < NPR; w++) w_data[32*w +: 32] = $urandom;
      if (v) begin
        for (int e = 0; e < nw; e++)
          for (int bit_i = 0; bit_i < m; bit_i++) begin
            a_data[e*m + bit_i] = avec[b*nw + e][bit_i];
            for (int q = 0; q < NPR; q++)
              w_data[32*q + e*m + bit_i] = wmat[q][b*nw + e][bit_i];
          end
        check(a_req == 1'b1, $sformatf("a_req at beat %0d", b));
      end
      check(out_valid == 1'b0, "no early out_valid");
      @(negedge clk);
      if (v) begin
        b++;
        beats++;
      end
    end
    in_valid = 1'b0;
    check(out_valid == 1'b1, "out_valid one cycle after last beat");
    check(busy == 1'b0, "idle after tile");
    check(beats == n / nw, "beat count N/(32/m)");
    for (int q = 0; q < NPR; q++) begin
      longint expv, got;
      expv = 0;
      for (int e = 0; e < n; e++) expv += longint'(wmat[q][e]) * avec[e];
      got = 0;
      for (int bit_i = 0; bit_i < int'(ST_ACC_W); bit_i++) got[bit_i] = acc[q][bit_i];
      if (got[ST_ACC_W-1]) got -= (longint'(1) << ST_ACC_W);
      check(got == expv, $sformatf("m=%0d output %0d: got %0d exp %0d", m, q, got, expv));
    end
  endtask

  initial begin
    checks   = 0;
    failures = 0;
    rst_n    = 1'b0;
    start    = 1'b0;
    in_valid = 1'b0;
    prec_in  = PREC16;
    n_elems  = '0;
    a_data   = '0;
    w_data   = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      run_tile(PREC16, 2, 1'b0);
      run_tile(PREC16, 40, 1'b1);
      run_tile(PREC8, 64, 1'b1);
      run_tile(PREC4, 64, 1'b1);
      run_tile(PREC2, 256, 1'b1);
      run_tile(PREC2, 16, 1'b0);
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fc_layer: a whole fully connected layer on both engines.
//
// Computes y = W x A for one M x N layer (M = 128 rows, N = 128 inputs) in
// each precision mode (16, 8, 4 and 2 bits) on the Sum Separate and on the
// Sum Together engine, which process the same random signed weights and
// activations side by side. The layer is cut into row blocks of one tile
// each (16*16/m rows for SS, 8 rows for ST), every output is checked
// against a dot product computed here, and the total number of compute
// beats of the layer is checked against the nominal engine rate:
// M*N/16, M*N/32, M*N/64 and M*N/128 for 16-, 8-, 4- and 2-bit precision,
// equal for both engines. Runs without stalls, at full size.
module tb_fc_layer;
  import psmac_pkg::*;

  localparam int NMAX = 256;

  logic clk, rst_n;
  logic ss_start, ss_in_valid, ss_busy, ss_a_req, ss_out_valid;
  logic st_start, st_in_valid, st_busy, st_a_req, st_out_valid;
  prec_t ss_prec_in, ss_prec, st_prec_in, st_prec;
  logic [15:0] ss_n_elems, st_n_elems;
  logic [ACT_BUS-1:0] ss_a_data, st_a_data;
  logic [WGT_BUS-1:0] ss_w_data, st_w_data;
  logic [15:0][SS_ACC_W-1:0] ss_acc;
  logic [7:0][ST_ACC_W-1:0]  st_acc;
  logic [1:0]  hy_mode;
  logic [5:0]  hy_x, hy_y;
  logic [11:0] hy_p;
  int n_hy [4];

  int checks, failures;
  int ss_wmat [128][NMAX];
  int ss_avec [NMAX];
  int st_wmat [8][NMAX];
  int st_avec [NMAX];
  localparam int LM = 128;
  localparam int LN = 128;
  int lw [LM][LN];
  int la [LN];
  int n_beats_ss, n_beats_st;

  psmac_top dut (
    .clk(clk), .rst_n(rst_n),
    .ss_start(ss_start), .ss_prec_in(ss_prec_in), .ss_n_elems(ss_n_elems),
    .ss_in_valid(ss_in_valid), .ss_a_data(ss_a_data), .ss_w_data(ss_w_data),
    .ss_busy(ss_busy), .ss_a_req(ss_a_req), .ss_prec(ss_prec),
    .ss_out_valid(ss_out_valid), .ss_acc(ss_acc),
    .st_start(st_start), .st_prec_in(st_prec_in), .st_n_elems(st_n_elems),
    .st_in_valid(st_in_valid), .st_a_data(st_a_data), .st_w_data(st_w_data),
    .st_busy(st_busy), .st_a_req(st_a_req), .st_prec(st_prec),
    .st_out_valid(st_out_valid), .st_acc(st_acc),
    .hy_mode(hy_mode), .hy_x(hy_x), .hy_y(hy_y), .hy_p(hy_p)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic int hy_field(logic [5:0] v, int lo, int w);
    int r;
    r = 0;
    for (int b = 0; b < w; b++) r += int'(v[lo + b]) << b;
    if (v[lo + w - 1]) r -= (1 << w);
    return r;
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  task automatic ss_tile(prec_t md, int n, bit stalls, int row0);
    int m, k, nw, rows, b, beats, stall_cycles;
    m    = int'(sub_width(md));
    k    = 16 / m;
    nw   = 32 / m;
    rows = 16 * k;
    for (int r = 0; r < rows; r++)
      for (int e = 0; e < n; e++) ss_wmat[r][e] = lw[row0 + r][e];
    for (int e = 0; e < n; e++) ss_avec[e] = la[e];

    @(negedge clk);
    ss_start   = 1'b1;
    ss_prec_in = md;
    ss_n_elems = 16'(n);
    @(negedge clk);
    ss_start   = 1'b0;
    check(ss_busy == 1'b1, "ss_busy after ss_start");
    b            = 0;
    beats        = 0;
    stall_cycles = 0;
    while (b < n) begin
      int c, t;
      bit v;
      v = stalls ? (($urandom % 4) != 0) : 1'b1;
      c = b / nw;
      t = b % nw;
      ss_in_valid = v;
      ss_a_data   = $urandom;
      for (int w = 0; w < 16 * 16 / 32; w++) ss_w_data[32*w +: 32] = $urandom;
      if (v) begin
        if (t == 0)
          for (int e = 0; e < nw; e++)
            for (int bit_i = 0; bit_i < m; bit_i++)
              ss_a_data[e*m + bit_i] = ss_avec[c*nw + e][bit_i];
        for (int p = 0; p < 16; p++)
          for (int f = 0; f < k; f++) begin
            int e;
            e = (f + t + ((p >= 16 / 2) ? k : 0)) % nw;
            for (int bit_i = 0; bit_i < m; bit_i++)
              ss_w_data[16*p + f*m + bit_i] = ss_wmat[p*k + f][c*nw + e][bit_i];
          end
        check(ss_a_req == (t == 0), $sformatf("ss_a_req at beat %0d", b));
      end else begin
        stall_cycles++;
      end
      check(ss_out_valid == 1'b0, "no early ss_out_valid");
      @(negedge clk);
      if (v) begin
        b++;
        beats++;
      end
    end
    ss_in_valid = 1'b0;
    check(ss_out_valid == 1'b1, "ss_out_valid one cycle after last beat");
    check(ss_busy == 1'b0, "idle after tile");
    check(beats == n, "beat count N");
    n_beats_ss += beats;
    // Compare every field of every PE.
    for (int p = 0; p < 16; p++) begin
      int fw;
      fw = 2 * m + int'(MARGIN);
      for (int f = 0; f < k; f++) begin
        longint expv, got;
        expv = 0;
        for (int e = 0; e < n; e++) expv += longint'(ss_wmat[p*k + f][e]) * ss_avec[e];
        got = 0;
        for (int bit_i = 0; bit_i < fw; bit_i++) got[bit_i] = ss_acc[p][f*fw + bit_i];
        if (got[fw-1]) got -= (longint'(1) << fw);
        check(got == expv, $sformatf("m=%0d PE %0d field %0d: got %0d exp %0d",
                                     m, p, f, got, expv));
      end
      if (k * fw < int'(SS_ACC_W))
        check((ss_acc[p] >> (k * fw)) == '0, "unused accumulator bits zero");
    end
  endtask

  task automatic st_tile(prec_t md, int n, bit stalls, int row0);
    int m, nw, b, beats, nbeats;
    m      = int'(sub_width(md));
    nw     = 32 / m;
    nbeats = n / nw;
    for (int r = 0; r < 8; r++)
      for (int e = 0; e < n; e++) st_wmat[r][e] = lw[row0 + r][e];
    for (int e = 0; e < n; e++) st_avec[e] = la[e];

    @(negedge clk);
    st_start   = 1'b1;
    st_prec_in = md;
    st_n_elems = 16'(n);
    @(negedge clk);
    st_start   = 1'b0;
    check(st_busy == 1'b1, "st_busy after st_start");
    b     = 0;
    beats = 0;
    while (b < nbeats) begin
      bit v;
      v = stalls ? (($urandom % 4) != 0) : 1'b1;
      st_in_valid = v;
      st_a_data   = $urandom;
      for (int w = 0; w < 8; w++) st_w_data[32*w +: 32] = $urandom;
      if (v) begin
        for (int e = 0; e < nw; e++)
          for (int bit_i = 0; bit_i < m; bit_i++) begin
            st_a_data[e*m + bit_i] = st_avec[b*nw + e][bit_i];
            for (int q = 0; q < 8; q++)
              st_w_data[32*q + e*m + bit_i] = st_wmat[q][b*nw + e][bit_i];
          end
        check(st_a_req == 1'b1, $sformatf("st_a_req at beat %0d", b));
      end
      check(st_out_valid == 1'b0, "no early st_out_valid");
      @(negedge clk);
      if (v) begin
        b++;
        beats++;
      end
    end
    st_in_valid = 1'b0;
    check(st_out_valid == 1'b1, "st_out_valid one cycle after last beat");
    check(st_busy == 1'b0, "idle after tile");
    check(beats == n / nw, "beat count N/(32/m)");
    n_beats_st += beats;
    for (int q = 0; q < 8; q++) begin
      longint expv, got;
      expv = 0;
      for (int e = 0; e < n; e++) expv += longint'(st_wmat[q][e]) * st_avec[e];
      got = 0;
      for (int bit_i = 0; bit_i < int'(ST_ACC_W); bit_i++) got[bit_i] = st_acc[q][bit_i];
      if (got[ST_ACC_W-1]) got -= (longint'(1) << ST_ACC_W);
      check(got == expv, $sformatf("m=%0d output %0d: got %0d exp %0d", m, q, got, expv));
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    rst_n = 1'b0;
    ss_start = 1'b0; ss_in_valid = 1'b0; ss_prec_in = PREC16; ss_n_elems = '0;
    ss_a_data = '0; ss_w_data = '0;
    st_start = 1'b0; st_in_valid = 1'b0; st_prec_in = PREC16; st_n_elems = '0;
    st_a_data = '0; st_w_data = '0;
    hy_mode = '0; hy_x = '0; hy_y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 4; md++) begin
      int m, ss_rows;
      m       = int'(sub_width(prec_t'(md)));
      ss_rows = 16 * (16 / m);
      for (int r = 0; r < LM; r++)
        for (int e = 0; e < LN; e++) lw[r][e] = rand_sub(m);
      for (int e = 0; e < LN; e++) la[e] = rand_sub(m);
      n_beats_ss = 0;
      n_beats_st = 0;
      fork
        for (int r0 = 0; r0 < LM; r0 += ss_rows) ss_tile(prec_t'(md), LN, 1'b0, r0);
        for (int r0 = 0; r0 < LM; r0 += 8)       st_tile(prec_t'(md), LN, 1'b0, r0);
      join
      check(n_beats_ss == LM * LN / (256 / m),
            $sformatf("SS layer beats %0d, expected %0d", n_beats_ss, LM * LN / (256 / m)));
      check(n_beats_st == LM * LN / (256 / m),
            $sformatf("ST layer beats %0d, expected %0d", n_beats_st, LM * LN / (256 / m)));
      $display("%0d-bit layer %0dx%0d: SS %0d beats, ST %0d beats", m, LM, LN, n_beats_ss, n_beats_st);
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_psmac_top: end-to-end test of the two MAC engines at full size.
//
// Runs matrix-vector products on the Sum Separate and the Sum Together
// engine at the same time, in every precision mode (16, 8, 4, 2 bits), with
// random signed weights and activations, random stalls and a change of
// precision mode between consecutive tiles. Every output of every tile is
// compared with a dot product computed here, and the beat counts are checked
// against the nominal rate (SS: N beats per tile; ST: N/(32/m)). The testbench counts
// how often each mechanism of the design happened: tiles per mode and
// engine (mode switches), stall cycles on each engine, activation word
// reloads and rotations of the SS circular buffer; a mechanism that never
// happened counts as a failure. The stand-alone 6-bit multiplier is driven
// in each of its four sub-word cuts. No parameter of the top is changed.
module tb_psmac_top;
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
  int n_tiles_ss [17];
  int n_tiles_st [17];
  int n_stall_ss, n_stall_st, n_reload, n_rotate;

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

  task automatic ss_tile(prec_t md, int n, bit stalls);
    int m, k, nw, rows, b, beats, stall_cycles;
    m    = int'(sub_width(md));
    k    = 16 / m;
    nw   = 32 / m;
    rows = 16 * k;
    for (int r = 0; r < rows; r++)
      for (int e = 0; e < n; e++) ss_wmat[r][e] = rand_sub(m);
    for (int e = 0; e < n; e++) ss_avec[e] = rand_sub(m);

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
        n_stall_ss++;
      end
      if (v && t == 0) n_reload++;
      if (v && t != 0) n_rotate++;
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
    n_tiles_ss[m]++;
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

  task automatic st_tile(prec_t md, int n, bit stalls);
    int m, nw, b, beats, nbeats;
    m      = int'(sub_width(md));
    nw     = 32 / m;
    nbeats = n / nw;
    for (int r = 0; r < 8; r++)
      for (int e = 0; e < n; e++) st_wmat[r][e] = rand_sub(m);
    for (int e = 0; e < n; e++) st_avec[e] = rand_sub(m);

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
      end else begin
        n_stall_st++;
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
    n_tiles_st[m]++;
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
    prec_t order [8];
    checks = 0; failures = 0;
    n_stall_ss = 0; n_stall_st = 0; n_reload = 0; n_rotate = 0;
    n_hy = '{0, 0, 0, 0};
    hy_mode = '0; hy_x = '0; hy_y = '0;
    for (int i = 0; i < 17; i++) begin n_tiles_ss[i] = 0; n_tiles_st[i] = 0; end
    rst_n = 1'b0;
    ss_start = 1'b0; ss_in_valid = 1'b0; ss_prec_in = PREC16; ss_n_elems = '0;
    ss_a_data = '0; ss_w_data = '0;
    st_start = 1'b0; st_in_valid = 1'b0; st_prec_in = PREC16; st_n_elems = '0;
    st_a_data = '0; st_w_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    order = '{PREC16, PREC2, PREC8, PREC4, PREC4, PREC16, PREC2, PREC8};
    foreach (order[i]) begin
      int nw;
      nw = 32 / int'(sub_width(order[i]));
      fork
        ss_tile(order[i], nw * (1 + i % 3), (i % 2) == 0);
        st_tile(order[i], nw * (2 + i % 4), 1'b1);
      join
    end
    // A full-precision and a 2-bit tile with a long inner dimension.
    fork
      ss_tile(PREC16, 256, 1'b1);
      st_tile(PREC16, 256, 1'b1);
    join
    fork
      ss_tile(PREC2, 256, 1'b1);
      st_tile(PREC2, 256, 1'b1);
    join
    // The 6-bit multiplier in each of its four cuts.
    for (int n = 0; n < 400; n++) begin
      int e;
      hy_mode = 2'(n % 4);
      hy_x    = 6'($urandom);
      hy_y    = 6'($urandom);
      #1;
      case (hy_mode)
        2'd0: e = hy_field(hy_x, 0, 6) * hy_field(hy_y, 0, 6);
        2'd1: e = 8 * (hy_field(hy_x, 0, 3) * hy_field(hy_y, 3, 3) + hy_field(hy_x, 3, 3) * hy_field(hy_y, 0, 3));
        2'd2: e = 16 * (hy_field(hy_x, 0, 2) * hy_field(hy_y, 4, 2) + hy_field(hy_x, 2, 2) * hy_field(hy_y, 2, 2)
                      + hy_field(hy_x, 4, 2) * hy_field(hy_y, 0, 2));
        default: e = 4 * (hy_field(hy_x, 0, 2) * hy_field(hy_y, 2, 4) + hy_field(hy_x, 2, 4) * hy_field(hy_y, 0, 2));
      endcase
      check(hy_p == 12'(e), $sformatf("6-bit multiplier mode %0d", hy_mode));
      n_hy[hy_mode]++;
    end
    #1;
    for (int md = 0; md < 4; md++) check(n_hy[md] > 0, "6-bit multiplier modes used");
    foreach (order[i]) begin
      int m;
      m = int'(sub_width(order[i]));
      check(n_tiles_ss[m] > 0 && n_tiles_st[m] > 0, $sformatf("tiles in %0d-bit mode", m));
    end
    check(n_stall_ss > 0, "SS stalls happened");
    check(n_stall_st > 0, "ST stalls happened");
    check(n_reload > 0, "SS buffer reloads happened");
    check(n_rotate > 0, "SS buffer rotations happened");
    $display("tiles SS 16/8/4/2-bit: %0d %0d %0d %0d, ST: %0d %0d %0d %0d",
             n_tiles_ss[16], n_tiles_ss[8], n_tiles_ss[4], n_tiles_ss[2],
             n_tiles_st[16], n_tiles_st[8], n_tiles_st[4], n_tiles_st[2]);
    $display("stalls SS %0d ST %0d, SS reloads %0d rotations %0d",
             n_stall_ss, n_stall_st, n_reload, n_rotate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

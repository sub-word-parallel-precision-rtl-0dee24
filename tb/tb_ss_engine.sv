// tb_ss_engine: self-checking test of the Sum Separate engine.
//
// Runs complete matrix-vector tiles in all four precision modes with random
// signed m-bit weights and activations, random stall cycles (in_valid low,
// data buses filled with junk) and back-to-back tiles. The testbench lays
// out the weight stream to follow the circular buffer's rotation: output row
// r = p*16/m + f is kept in field f of PE p. Each tile checks every output
// against a dot product computed here, the beat count (N beats per tile,
// the nominal rate), the activation request pattern (one 32-bit word every 32/m
// beats) and that out_valid comes exactly one cycle after the last beat.
module tb_ss_engine;
  import psmac_pkg::*;

  localparam int NPE  = 16;
  localparam int NMAX = 64;

  logic                      clk, rst_n;
  logic                      start, in_valid;
  prec_t                     prec_in, prec;
  logic [15:0]               n_elems;
  logic [ACT_BUS-1:0]        a_data;
  logic [16*NPE-1:0]         w_data;
  logic                      busy, a_req, out_valid;
  logic [NPE-1:0][SS_ACC_W-1:0] acc;

  int checks, failures;
  int wmat [128][NMAX];
  int avec [NMAX];

  ss_engine #(.N_PE(NPE)) dut (
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
    int m, k, nw, rows, b, beats, stall_cycles;
    m    = int'(sub_width(md));
    k    = 16 / m;
    nw   = 32 / m;
    rows = NPE * k;
    for (int r = 0; r < rows; r++)
      for (int e = 0; e < n; e++) wmat[r][e] = rand_sub(m);
    for (int e = 0; e < n; e++) avec[e] = rand_sub(m);

    @(negedge clk);
    start   = 1'b1;
    prec_in = md;
    n_elems = 16'(n);
    @(negedge clk);
    start   = 1'b0;
    check(busy == 1'b1, "busy after start");
    b            = 0;
    beats        = 0;
    stall_cycles = 0;
    while (b < n) begin
      int c, t;
      bit v;
      v = stalls ? (($urandom % 4) != 0) : 1'b1;
      c = b / nw;
      t = b % nw;
      in_valid = v;
      a_data   = $urandom;
      for (int w = 0; w < 16 * NPE / 32; w++) w_data[32*w +: 32] = $urandom;
      if (v) begin
        if (t == 0)
          for (int e = 0; e < nw; e++)
            for (int bit_i = 0; bit_i < m; bit_i++)
              a_data[e*m + bit_i] = avec[c*nw + e][bit_i];
        for (int p = 0; p < NPE; p++)
          for (int f = 0; f < k; f++) begin
            int e;
            e = (f + t + ((p >= NPE / 2) ? k : 0)) % nw;
            for (int bit_i = 0; bit_i < m; bit_i++)
              w_data[16*p + f*m + bit_i] = wmat[p*k + f][c*nw + e][bit_i];
          end
        check(a_req == (t == 0), $sformatf("a_req at beat %0d", b));
      end else begin
        stall_cycles++;
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
    check(beats == n, "beat count N");
    // Compare every field of every PE.
    for (int p = 0; p < NPE; p++) begin
      int fw;
      fw = 2 * m + int'(MARGIN);
      for (int f = 0; f < k; f++) begin
        longint expv, got;
        expv = 0;
        for (int e = 0; e < n; e++) expv += longint'(wmat[p*k + f][e]) * avec[e];
        got = 0;
        for (int bit_i = 0; bit_i < fw; bit_i++) got[bit_i] = acc[p][f*fw + bit_i];
        if (got[fw-1]) got -= (longint'(1) << fw);
        check(got == expv, $sformatf("m=%0d PE %0d field %0d: got %0d exp %0d",
                                     m, p, f, got, expv));
      end
      if (k * fw < int'(SS_ACC_W))
        check((acc[p] >> (k * fw)) == '0, "unused accumulator bits zero");
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
      run_tile(PREC16, 10, 1'b1);
      run_tile(PREC8, 12, 1'b1);
      run_tile(PREC4, 32, 1'b1);
      run_tile(PREC2, 64, 1'b1);
      run_tile(PREC2, 16, 1'b0);
    end
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ss_pe: Sum Separate processing element.
//
// One SS-configured sbw_mult and a 112-bit accumulation register. In
// precision mode m the multiplier delivers 16/m independent 2m-bit signed
// products; the register is split into 16/m fields of 2m+10 bits, field f
// at bits [f*(2m+10) +: 2m+10], and every product is sign-extended and added
// into its own field with the carries between fields broken. The 10 extra
// bits per field are the accumulation headroom of the published design
// (8 x 14 = 112 bits in 2-bit mode, the widest case); the field packing
// order is this implementation's choice. Bits above the last field in
// 16-, 8- and 4-bit mode stay zero.
//
// Timing: one multiply-accumulate per cycle with en = 1. With clear = 1 the
// register is loaded with the new products instead of adding them (first
// beat of a new output tile). The result is in `acc` one cycle after the
// last beat. Synchronous active-low reset clears the register.
module ss_pe
  import psmac_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  prec_t                prec,
  input  logic                 en,
  input  logic                 clear,
  input  logic [15:0]          x,     // weight sub-words
  input  logic [15:0]          y,     // activation sub-words
  output logic [SS_ACC_W-1:0]  acc
);

  localparam int unsigned AW = SS_ACC_W;

  logic [31:0] prod;

  sbw_mult #(.SUM_TOGETHER(1'b0)) u_mult (
    .prec (prec),
    .x    (x),
    .y    (y),
    .p    (prod)
  );

  // Carry-kill positions of the accumulator fields in mode md.
  function automatic logic [AW-1:0] field_kill(prec_t md);
    logic [AW-1:0] r;
    int unsigned   fw;
    fw = ss_field_width(md);
    r  = '0;
    for (int unsigned b = 1; b < AW; b++) r[b] = (b % fw) == 0;
    return r;
  endfunction

  function automatic logic [AW-1:0] field_add(logic [AW-1:0] a, logic [AW-1:0] b,
                                            logic [AW-1:0] brk);
    logic [AW-1:0] s;
    logic          c;
    c = 1'b0;
    for (int unsigned n = 0; n < AW; n++) begin
      if (brk[n]) c = 1'b0;
      s[n] = a[n] ^ b[n] ^ c;
      c    = (a[n] & b[n]) | (c & (a[n] ^ b[n]));
    end
    return s;
  endfunction

  // Products placed in their fields, one vector per mode.
  logic [3:0][AW-1:0] addend_md;
  logic [3:0][AW-1:0] kill_md;

  for (genvar md = 0; md < 4; md++) begin : g_md
    localparam int unsigned M  = sub_width(prec_t'(md));
    localparam int unsigned K  = MAX_PREC / M;
    localparam int unsigned FW = 2 * M + MARGIN;
    for (genvar f = 0; f < K; f++) begin : g_f
      assign addend_md[md][f*FW +: FW] =
        {{(FW - 2*M){prod[2*M*f + 2*M - 1]}}, prod[2*M*f +: 2*M]};
    end
    if (K * FW < AW) begin : g_pad
      assign addend_md[md][AW-1:K*FW] = '0;
    end
    assign kill_md[md] = field_kill(prec_t'(md));
  end

  logic [AW-1:0] addend, kill, acc_next;

  assign addend   = addend_md[prec];
  assign kill     = kill_md[prec];
  assign acc_next = field_add(clear ? '0 : acc, addend, kill);

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule

// st_engine: Sum Together matrix-vector engine.
//
// Computes part of y = W x A with two sets of N_PAIR ST-configured
// multipliers (16 in total) arranged as N_PAIR tandem pairs (st_pe). Every
// beat brings a new 32-bit activation word (32/m elements) and a 256-bit
// weight word; pair q multiplies w_data[32q +: 32] element by element with
// the activation word, the bottom 16 bits in one multiplier and the top 16
// bits in the other, and the array sums the products internally. One tile
// produces N_PAIR outputs (rows) after N / (32/m) beats, so both the weight
// and activation streams are read linearly: beat b carries elements
// b*32/m .. b*32/m + 32/m - 1 of A, and of row q of the current row block in
// w_data[32q +: 32], element 0 in the least significant bits.
//
// A sum-together multiplier pairs weight sub-word a with activation
// sub-word 16/m-1-a. The engine therefore reverses the order of the m-bit
// sub-words inside each 16-bit activation half once, before broadcasting it,
// so that element n of the weights meets element n of the activations. The
// pair structure, bus widths and 42-bit accumulators follow the published
// design; this reversal, the weight bit order and the control handshake are
// this implementation's choices.
//
// Interface: start/prec_in/n_elems begin a tile; in_valid marks a beat
// (a_data and w_data are both sampled); out_valid pulses one cycle after the
// last beat, and acc[q] then holds output q until the next tile's first beat.
module st_engine
  import psmac_pkg::*;
#(
  parameter int unsigned N_PAIR = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  prec_t                    prec_in,
  input  logic [15:0]              n_elems,
  input  logic                     in_valid,
  input  logic [ACT_BUS-1:0]       a_data,
  input  logic [32*N_PAIR-1:0]     w_data,
  output logic                     busy,
  output logic                     a_req,
  output prec_t                    prec,
  output logic                     out_valid,
  output logic [N_PAIR-1:0][ST_ACC_W-1:0] acc
);

  logic               beat, first;
  logic [ACT_BUS-1:0] a_rev;

  mac_ctrl #(.SUM_TOGETHER(1'b1)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .prec_in   (prec_in),
    .n_elems   (n_elems),
    .in_valid  (in_valid),
    .prec      (prec),
    .busy      (busy),
    .beat      (beat),
    .first     (first),
    .a_req     (a_req),
    .out_valid (out_valid)
  );

  // Reverse the m-bit sub-words within each 16-bit half.
  function automatic logic [15:0] rev_sub(logic [15:0] v, prec_t md);
    logic [15:0] r;
    case (md)
      PREC16:  r = v;
      PREC8:   r = {v[7:0], v[15:8]};
      PREC4:   r = {v[3:0], v[7:4], v[11:8], v[15:12]};
      default: r = {v[1:0], v[3:2], v[5:4], v[7:6], v[9:8], v[11:10], v[13:12], v[15:14]};
    endcase
    return r;
  endfunction

  assign a_rev = {rev_sub(a_data[31:16], prec), rev_sub(a_data[15:0], prec)};

  for (genvar q = 0; q < N_PAIR; q++) begin : g_pair
    st_pe u_pair (
      .clk   (clk),
      .rst_n (rst_n),
      .prec  (prec),
      .en    (beat),
      .clear (first),
      .x_lo  (w_data[32*q +: 16]),
      .y_lo  (a_rev[15:0]),
      .x_hi  (w_data[32*q + 16 +: 16]),
      .y_hi  (a_rev[31:16]),
      .acc   (acc[q])
    );
  end

endmodule

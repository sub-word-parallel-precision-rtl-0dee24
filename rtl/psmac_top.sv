// psmac_top: the two precision-scalable matrix-vector MAC engines.
//
// Both engines are built from the same 16-bit sub-word parallel
// Baugh-Wooley multiplier, 16 of them each, and reach the same throughput:
// 16 x 16/m multiply-accumulates per cycle at m-bit precision
// (m = 16, 8, 4, 2), fed by a 32-bit activation bus and a 256-bit weight bus.
//   ss_*  Sum Separate engine: 16 PEs with independent sub-word products,
//         a circular activation buffer and 112-bit split accumulators.
//   st_*  Sum Together engine: 8 tandem pairs whose multipliers add their
//         sub-word products internally, 42-bit accumulators.
//   hy_*  a stand-alone 6-bit sum-together multiplier with 6-, 3-, 2- and
//         mixed 2/4-bit sub-words (combinational), showing the mapping on a
//         non-power-of-two array.
// The blocks are independent and share only clock and reset; each has its
// own control, data and result ports (see ss_engine and st_engine for the
// stream formats and timing). Placing them side by side, so that the same
// workload can be run on either engine, is this implementation's choice.
module psmac_top
  import psmac_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // Sum Separate engine
  input  logic                        ss_start,
  input  prec_t                       ss_prec_in,
  input  logic [15:0]                 ss_n_elems,
  input  logic                        ss_in_valid,
  input  logic [ACT_BUS-1:0]          ss_a_data,
  input  logic [WGT_BUS-1:0]          ss_w_data,
  output logic                        ss_busy,
  output logic                        ss_a_req,
  output prec_t                       ss_prec,
  output logic                        ss_out_valid,
  output logic [15:0][SS_ACC_W-1:0]   ss_acc,
  // Sum Together engine
  input  logic                        st_start,
  input  prec_t                       st_prec_in,
  input  logic [15:0]                 st_n_elems,
  input  logic                        st_in_valid,
  input  logic [ACT_BUS-1:0]          st_a_data,
  input  logic [WGT_BUS-1:0]          st_w_data,
  output logic                        st_busy,
  output logic                        st_a_req,
  output prec_t                       st_prec,
  output logic                        st_out_valid,
  output logic [7:0][ST_ACC_W-1:0]    st_acc,
  // 6-bit mixed sub-word sum-together multiplier
  input  logic [1:0]                  hy_mode,
  input  logic [5:0]                  hy_x,
  input  logic [5:0]                  hy_y,
  output logic [11:0]                 hy_p
);

  ss_engine #(.N_PE(16)) u_ss (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (ss_start),
    .prec_in   (ss_prec_in),
    .n_elems   (ss_n_elems),
    .in_valid  (ss_in_valid),
    .a_data    (ss_a_data),
    .w_data    (ss_w_data),
    .busy      (ss_busy),
    .a_req     (ss_a_req),
    .prec      (ss_prec),
    .out_valid (ss_out_valid),
    .acc       (ss_acc)
  );

  st_engine #(.N_PAIR(8)) u_st (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (st_start),
    .prec_in   (st_prec_in),
    .n_elems   (st_n_elems),
    .in_valid  (st_in_valid),
    .a_data    (st_a_data),
    .w_data    (st_w_data),
    .busy      (st_busy),
    .a_req     (st_a_req),
    .prec      (st_prec),
    .out_valid (st_out_valid),
    .acc       (st_acc)
  );

  hybrid_6b_mult u_hy (
    .mode (hy_mode),
    .x    (hy_x),
    .y    (hy_y),
    .p    (hy_p)
  );

endmodule

// ss_engine: Sum Separate matrix-vector engine.
//
// Computes part of y = W x A for a weight matrix W (M x N) and an activation
// vector A (N x 1) with 16 SS processing elements working in parallel. In
// precision mode m every PE holds 16/m independent accumulators, so one tile
// produces 16 * 16/m outputs (16, 32, 64 or 128) after N beats.
//
// Activations arrive 32 bits (32/m elements) at a time into a circular
// buffer that rotates by m bits every beat; its top 16 bits are broadcast to
// PEs N_PE/2 .. N_PE-1 and its bottom 16 bits to PEs 0 .. N_PE/2-1. A new
// activation word is requested (`a_req`) once every 32/m beats. Weights
// arrive 256 bits every beat, 16 bits per PE: PE p takes w_data[16p +: 16].
// The weight stream must therefore be ordered to match the rotation: on beat
// t of a word (t = 0 .. 32/m-1), sub-word f of PE p must hold the weight of
// the output row kept in field f of that PE for activation element
//   e = (f + t + (p >= N_PE/2 ? 16/m : 0)) mod 32/m   of the current word.
// The 16-PE organisation, the 32-bit circular buffer with top/bottom
// broadcast, the 256-bit weight bus and the 112-bit accumulators follow the
// published design; the field order inside a PE, the element order on the
// weight bus and the control handshake are this implementation's choices.
//
// Interface: start/prec_in/n_elems begin a tile; in_valid marks a beat
// (a_data is sampled on beats with a_req high, w_data on every beat);
// out_valid pulses one cycle after the last beat, and acc[p] then holds the
// fields of PE p (see ss_pe) until the next tile's first beat.
module ss_engine
  import psmac_pkg::*;
#(
  parameter int unsigned N_PE = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  prec_t                    prec_in,
  input  logic [15:0]              n_elems,
  input  logic                     in_valid,
  input  logic [ACT_BUS-1:0]       a_data,
  input  logic [16*N_PE-1:0]       w_data,
  output logic                     busy,
  output logic                     a_req,
  output prec_t                    prec,
  output logic                     out_valid,
  output logic [N_PE-1:0][SS_ACC_W-1:0] acc
);

  logic               beat, first;
  logic [ACT_BUS-1:0] view;

  mac_ctrl #(.SUM_TOGETHER(1'b0)) u_ctrl (
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

  circ_act_buffer u_abuf (
    .clk   (clk),
    .rst_n (rst_n),
    .prec  (prec),
    .load  (beat & a_req),
    .adv   (beat),
    .a_in  (a_data),
    .view  (view)
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    ss_pe u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .prec  (prec),
      .en    (beat),
      .clear (first),
      .x     (w_data[16*p +: 16]),
      .y     ((p >= N_PE / 2) ? view[31:16] : view[15:0]),
      .acc   (acc[p])
    );
  end

endmodule

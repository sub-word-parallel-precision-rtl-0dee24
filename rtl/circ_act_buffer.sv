// circ_act_buffer: circular activation buffer of the Sum Separate engine.
//
// Holds one 32-bit activation word, i.e. 32/m activations of m bits, and
// rotates it right by m bits on every engine beat, so that after t beats
// sub-word position i holds activation (i + t) mod 32/m. The top 16 bits are
// broadcast to one group of PEs and the bottom 16 bits to the other; over
// 32/m beats every position sees every activation of the word once. Loading
// 32 bits at a time and rotating by m per cycle follow the published design.
// The bypass is this implementation's choice: on a beat that loads a new
// word, `view` shows the incoming word itself, so the word is used in the
// same cycle it arrives and the register stores it already rotated once.
//
// Interface: load with a_in loads a word; adv rotates (a beat is consumed);
// view is the word the PEs see this cycle (view[31:16] top group,
// view[15:0] bottom group). Synchronous active-low reset clears it.
module circ_act_buffer
  import psmac_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  prec_t               prec,
  input  logic                load,
  input  logic                adv,
  input  logic [ACT_BUS-1:0]  a_in,
  output logic [ACT_BUS-1:0]  view
);

  logic [ACT_BUS-1:0] buf_q;
  logic [ACT_BUS-1:0] rot;

  assign view = load ? a_in : buf_q;

  // Rotate right by m bits.
  always_comb begin
    case (prec)
      PREC16:  rot = {view[15:0], view[31:16]};
      PREC8:   rot = {view[7:0],  view[31:8]};
      PREC4:   rot = {view[3:0],  view[31:4]};
      default: rot = {view[1:0],  view[31:2]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    buf_q <= '0;
    else if (adv)  buf_q <= rot;
    else if (load) buf_q <= a_in;
  end

endmodule

// mac_ctrl: tile sequencer of the SS and ST engines.
//
// One "tile" is one pass of the engine over a matrix-vector product: the
// inner dimension N is streamed in, one beat per cycle, and at the end every
// accumulator holds a finished dot product. The number of beats per tile
// follows the published engine rates:
//   Sum Separate (SUM_TOGETHER = 0): N beats; a new 32-bit activation word is
//     needed on the first beat of every chunk of 32/m beats, the buffer
//     rotation supplies the rest.
//   Sum Together (SUM_TOGETHER = 1): N / (32/m) beats, a new activation word
//     on every beat.
// A new 256-bit weight word is consumed on every beat in both engines.
//
// Interface (this implementation's choice; the engine concept fixes no control
// protocol): `start` with `prec_in` and `n_elems` begins a tile when the
// controller is idle (`busy` low). While busy, each cycle with `in_valid`
// high is a beat (`beat`); `in_valid` low stalls the engine. `first` marks the
// first beat of a tile (accumulators are loaded, not added), `a_req` the beats
// that consume a new activation word, `last` the final beat. `out_valid`
// pulses for one cycle after the last beat, when the accumulators hold the
// results; they stay there until the first beat of the next tile. `busy`
// falls together with `out_valid`, so the next `start` can be given in that
// cycle. N must be a non-zero multiple of 32/m.
module mac_ctrl
  import psmac_pkg::*;
#(
  parameter bit SUM_TOGETHER = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  prec_t        prec_in,
  input  logic [15:0]  n_elems,
  input  logic         in_valid,
  output prec_t        prec,
  output logic         busy,
  output logic         beat,
  output logic         first,
  output logic         a_req,
  output logic         out_valid
);

  logic        last;
  logic [15:0] beat_cnt, beats_total;
  logic [3:0]  chunk_cnt;
  logic [3:0]  chunk_last;   // 32/m - 1
  logic [15:0] total_next;

  // 32/m activations per 32-bit word.
  function automatic logic [3:0] words_m1(prec_t p);
    case (p)
      PREC16:  return 4'd1;
      PREC8:   return 4'd3;
      PREC4:   return 4'd7;
      default: return 4'd15;
    endcase
  endfunction

  always_comb begin
    if (SUM_TOGETHER) begin
      case (prec_in)
        PREC16:  total_next = n_elems >> 1;
        PREC8:   total_next = n_elems >> 2;
        PREC4:   total_next = n_elems >> 3;
        default: total_next = n_elems >> 4;
      endcase
    end else begin
      total_next = n_elems;
    end
  end

  assign chunk_last = words_m1(prec);
  assign beat       = busy & in_valid;
  assign first      = beat_cnt == '0;
  assign last       = beat_cnt == beats_total - 16'd1;
  assign a_req      = busy & (SUM_TOGETHER ? 1'b1 : (chunk_cnt == '0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      prec        <= PREC16;
      beats_total <= '0;
      beat_cnt    <= '0;
      chunk_cnt   <= '0;
      out_valid   <= 1'b0;
    end else begin
      out_valid <= beat & last;
      if (!busy) begin
        if (start && total_next != '0) begin
          busy        <= 1'b1;
          prec        <= prec_in;
          beats_total <= total_next;
          beat_cnt    <= '0;
          chunk_cnt   <= '0;
        end
      end else if (beat) begin
        if (last) begin
          busy     <= 1'b0;
          beat_cnt <= '0;
        end else begin
          beat_cnt <= beat_cnt + 16'd1;
        end
        chunk_cnt <= (chunk_cnt == chunk_last) ? '0 : chunk_cnt + 4'd1;
      end
    end
  end

  // A tile must cover whole activation words.
  property p_len_aligned;
    @(posedge clk) disable iff (!rst_n)
      (start && !busy) |-> ((n_elems & 16'(words_m1(prec_in))) == '0 && n_elems != '0);
  endproperty
  a_len_aligned: assert property (p_len_aligned)
    else $error("mac_ctrl: N=%0d is not a non-zero multiple of 32/m", n_elems);

endmodule

// macropixel_readout: the macropixel's second (output) register set and its
// small readout state machine.
//
// At frame_end the acquisition registers are copied into the output
// registers, so the next frame can be acquired while this one is read out
// (double buffering). Readout then runs on the row clock that travels along
// the row from pixel to pixel: a pixel that still has words to send owns the
// row bus as soon as all pixels before it are done (sel_in), consumes one
// row-clock pulse per word, and after its last word lets later pulses pass to
// the next pixel (clk_out) and hands the bus on (sel_out). The number and
// layout of the 23-bit words depend on the readout mode:
//   RO_FULL      4 words, word k = {count k, conversion k}
//   RO_FAST      1 word: single mode {3'b0, idx, conversion idx},
//                coincidence mode {two-photon count, conversion 0}
//   RO_FAST_CNT  single mode 2 words: {3'b0, counts 3..0} then the RO_FAST
//                word; coincidence mode 1 word as RO_FAST
//   RO_COUNT     1 word {3'b0, counts 3..0}
// Word counts per mode follow the published design; the bit layouts are this
// design's choice. The bus driver is modelled as an enable (bus_en) plus
// data; the row combines the enabled drivers.
//
// The operating and readout modes are latched together with the data, so a
// configuration change for the next frame does not alter the words of the
// frame being read out.
//
// Timing: row_clk/clk_in are one-cycle clock-enable pulses; the word on
// bus_data changes in the cycle after the pulse that consumed the previous
// one. After reset a pixel has nothing to send.
module macropixel_readout (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       frame_end,  // load output registers, restart
  input  spad_pkg::frame_data_t      acq,        // acquisition registers
  input  spad_pkg::op_mode_e         mode,
  input  spad_pkg::ro_mode_e         ro_mode,
  input  logic                       clk_in,     // row clock from the previous pixel
  input  logic                       sel_in,     // all previous pixels done
  output logic                       clk_out,    // row clock to the next pixel
  output logic                       sel_out,
  output logic                       bus_en,
  output logic [spad_pkg::WORD_W-1:0] bus_data
);
  import spad_pkg::*;

  frame_data_t q;
  op_mode_e    q_mode;     // formats latched with the data
  ro_mode_e    q_ro_mode;
  logic        done;
  logic [1:0]  widx;
  logic [1:0]  last;
  logic [WORD_W-1:0] w_fast, w_cnt;

  always_comb begin
    unique case (q_ro_mode)
      RO_FULL:     last = 2'd3;
      RO_FAST_CNT: last = (q_mode == OP_SINGLE) ? 2'd1 : 2'd0;
      default:     last = 2'd0;
    endcase
  end

  assign w_cnt  = {3'b000, q.cnt[3], q.cnt[2], q.cnt[1], q.cnt[0]};
  assign w_fast = (q_mode == OP_SINGLE) ? {3'b000, q.first_idx, q.conv[q.first_idx]}
                                      : {q.cnt[0], q.conv[0]};

  always_comb begin
    unique case (q_ro_mode)
      RO_FULL:     bus_data = {q.cnt[widx], q.conv[widx]};
      RO_FAST:     bus_data = w_fast;
      RO_FAST_CNT: bus_data = (last == 2'd1 && widx == 2'd0) ? w_cnt : w_fast;
      default:     bus_data = w_cnt;
    endcase
  end

  assign bus_en  = sel_in && !done;
  assign sel_out = sel_in && done;
  assign clk_out = clk_in && done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= '0;
      q_mode    <= OP_SINGLE;
      q_ro_mode <= RO_FULL;
      done      <= 1'b1;
      widx <= '0;
    end else if (frame_end) begin
      q         <= acq;
      q_mode    <= mode;
      q_ro_mode <= ro_mode;
      done      <= 1'b0;
      widx <= '0;
    end else if (clk_in && !done) begin
      if (widx == last) done <= 1'b1;
      else              widx <= widx + 2'd1;
    end
  end
endmodule

// macropixel: 2x2 SPADs with shared timing electronics.
//
// Each SPAD has its own hold-off counter and 5-bit photon counter; a central
// arbiter shares one TDC (pixel_tdc) among the four and writes each
// conversion ({gate, coarse, fine}, 18 bits) into one of four storage
// registers. At frame_end the storage registers and counters are handed to
// the output registers of macropixel_readout and cleared, so acquisition and
// readout overlap. The analog front end (SPAD and quenching circuit with its
// gating transistor) is represented by its digital effect: a photon produces
// an avalanche (det) only while GATE is on, the SPAD is enabled in the
// configuration and its hold-off has expired.
//
// Interface: photon[k]/photon_t[k] give a photon hitting SPAD k in this clk
// (reference clock) cycle and its position in the period (Tck/32 units); SPAD
// k sits at row k/2, column k%2 of the macropixel. start marks the START of a
// gate window, gate is the GATE level; frame_end must be given while GATE is
// off (this design's rule). The readout side is described in
// macropixel_readout.
module macropixel (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration
  input  spad_pkg::op_mode_e          mode,
  input  spad_pkg::ro_mode_e          ro_mode,
  input  logic                        timing_en,
  input  logic                        count_en,
  input  logic [1:0]                  holdoff_cfg,
  input  logic [spad_pkg::NSPAD-1:0]  spad_en,
  // acquisition
  input  logic                        gate,
  input  logic                        start,
  input  logic                        frame_end,
  input  logic [spad_pkg::NSPAD-1:0]  photon,
  input  logic [spad_pkg::NSPAD-1:0][spad_pkg::FINE_W-1:0] photon_t,
  // readout
  input  logic                        clk_in,
  input  logic                        sel_in,
  output logic                        clk_out,
  output logic                        sel_out,
  output logic                        bus_en,
  output logic [spad_pkg::WORD_W-1:0] bus_data
);
  import spad_pkg::*;

  logic              gate_q, gate_rise;
  logic [NSPAD-1:0]  armed, det, wr, cnt_inc;
  logic              stop, tdc_ready, coinc;
  logic [FINE_W-1:0] stop_t;
  logic [1:0]        first_idx;
  conv_t             tdc_conv;
  conv_t [NSPAD-1:0] stor;
  logic [NSPAD-1:0][CNT_W-1:0] cnt;
  frame_data_t       acq;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) gate_q <= 1'b0;
    else        gate_q <= gate;
  assign gate_rise = gate && !gate_q;

  assign det = photon & armed & {NSPAD{gate}};

  for (genvar k = 0; k < NSPAD; k++) begin : g_spad
    holdoff_counter u_holdoff (
      .clk, .rst_n, .det(det[k]), .gate_rise, .holdoff_cfg,
      .spad_en(spad_en[k]), .armed(armed[k]));
    photon_counter u_cnt (
      .clk, .rst_n, .clr(frame_end), .inc(cnt_inc[k]), .count(cnt[k]));
  end

  pixel_arbiter u_arb (
    .clk, .rst_n, .mode, .fast(ro_mode == RO_FAST || ro_mode == RO_FAST_CNT),
    .count_en, .start, .frame_end, .det, .det_t(photon_t), .tdc_ready,
    .stop, .stop_t, .wr, .cnt_inc, .first_idx, .coinc);

  pixel_tdc u_tdc (
    .clk, .rst_n, .timing_en, .frame_end, .start, .stop, .stop_t,
    .ready(tdc_ready), .conv(tdc_conv));

  // storage registers: gate field 0 means empty
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stor <= '0;
    else if (frame_end) stor <= '0;
    else
      for (int k = 0; k < NSPAD; k++)
        if (wr[k]) stor[k] <= tdc_conv;
  end

  assign acq.conv      = stor;
  assign acq.cnt       = cnt;
  assign acq.first_idx = first_idx;

  macropixel_readout u_ro (
    .clk, .rst_n, .frame_end, .acq, .mode, .ro_mode,
    .clk_in, .sel_in, .clk_out, .sel_out, .bus_en, .bus_data);
endmodule

// pixel_arbiter: shares the macropixel's single TDC among its four SPADs.
//
// Single-photon mode: in each gate window the first photon (smallest arrival
// time) among the SPADs that have not yet stored a conversion in this frame
// wins the TDC; its conversion goes to that SPAD's own register and the SPAD
// is then excluded from the TDC until frame end. Simultaneous arrivals are
// resolved towards the lower SPAD index (this design's choice).
//
// Two-photon-coincidence mode: a photon opens a coincidence window of
// COINC_WIN sub-intervals (13 x 75 ps, about 1 ns); a second photon from
// another SPAD inside it triggers the TDC with the time of that second
// photon. Since no photon can trigger before, the first trigger of a gate is
// the earliest photon whose predecessor lies within the window. At most one
// two-photon event is accepted per gate. Results fill the four registers in
// order (registers are no longer tied to a SPAD) and two-photon events are
// counted by counter 0; counters 1..3 stay idle (this design's choice).
//
// Fast readout: only one conversion per macropixel and frame is stored
// (first_idx tells which register).
//
// Arrival times are per clk cycle plus a 5-bit position; a window may span
// into the next cycle, so the latest photon of a cycle is kept as pending.
// Outputs are combinational for the current cycle; the state (stored flags,
// pending photon, gate done) is cleared by frame_end / start.
module pixel_arbiter #(
  parameter int unsigned COINC_WIN = 13
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  spad_pkg::op_mode_e                        mode,
  input  logic                                      fast,       // one conversion per frame
  input  logic                                      count_en,
  input  logic                                      start,      // new gate window
  input  logic                                      frame_end,
  input  logic [spad_pkg::NSPAD-1:0]                det,        // avalanches this cycle
  input  logic [spad_pkg::NSPAD-1:0][spad_pkg::FINE_W-1:0] det_t,
  input  logic                                      tdc_ready,
  output logic                                      stop,
  output logic [spad_pkg::FINE_W-1:0]               stop_t,
  output logic [spad_pkg::NSPAD-1:0]                wr,         // register to write
  output logic [spad_pkg::NSPAD-1:0]                cnt_inc,    // photon counter increments
  output logic [1:0]                                first_idx,  // register of first conversion
  output logic                                      coinc       // two-photon event this cycle
);
  import spad_pkg::*;

  logic [NSPAD-1:0]  has_conv;
  logic              any_conv;
  logic              pend_v;
  logic [FINE_W-1:0] pend_t;
  logic              gate_done;   // coincidence already seen in this gate

  // combinational decisions
  logic [NSPAD-1:0]  cand;        // photons that may trigger
  logic              found;
  logic [1:0]        widx;
  logic [FINE_W:0]   wtime;       // 6-bit time: current cycle at +32
  logic [1:0]        free_idx;
  logic              free_any;
  logic              allow;       // fast-mode budget left
  logic [FINE_W:0]   last_t;

  assign allow = !(fast && any_conv);

  always_comb begin
    cand     = '0;
    found    = 1'b0;
    widx     = '0;
    wtime    = '1;
    free_any = 1'b0;
    free_idx = '0;
    last_t   = '0;
    stop     = 1'b0;
    stop_t   = '0;
    wr       = '0;
    cnt_inc  = '0;
    coinc    = 1'b0;

    for (int k = NSPAD-1; k >= 0; k--)
      if (!has_conv[k]) begin free_any = 1'b1; free_idx = 2'(k); end

    if (mode == OP_SINGLE) begin
      cand = det & ~has_conv;
      for (int k = 0; k < NSPAD; k++)
        if (cand[k] && (!found || {1'b1, det_t[k]} < wtime)) begin
          found = 1'b1; widx = 2'(k); wtime = {1'b1, det_t[k]};
        end
      if (found && tdc_ready && allow) begin
        stop       = 1'b1;
        stop_t     = det_t[widx];
        wr[widx]   = 1'b1;
      end
      if (count_en) cnt_inc = det;
    end else begin
      // photon j triggers if another photon (this cycle or the pending one)
      // arrived no later than it and within the window
      for (int j = 0; j < NSPAD; j++) begin
        if (det[j]) begin
          if (pend_v && ({1'b1, det_t[j]} - {1'b0, pend_t}) <= (FINE_W+1)'(COINC_WIN))
            cand[j] = 1'b1;
          for (int i = 0; i < NSPAD; i++)
            if (i != j && det[i] && det_t[i] <= det_t[j] &&
                (det_t[j] - det_t[i]) <= FINE_W'(COINC_WIN))
              cand[j] = 1'b1;
        end
        if (cand[j] && (!found || {1'b1, det_t[j]} < wtime)) begin
          found = 1'b1; widx = 2'(j); wtime = {1'b1, det_t[j]};
        end
      end
      if (found && !gate_done) begin
        coinc = 1'b1;
        if (count_en) cnt_inc[0] = 1'b1;
        if (tdc_ready && free_any && allow) begin
          stop         = 1'b1;
          stop_t       = det_t[widx];
          wr[free_idx] = 1'b1;
        end
      end
    end

    for (int k = 0; k < NSPAD; k++)
      if (det[k] && {1'b1, det_t[k]} > last_t) last_t = {1'b1, det_t[k]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      has_conv  <= '0;
      any_conv  <= 1'b0;
      first_idx <= '0;
      pend_v    <= 1'b0;
      pend_t    <= '0;
      gate_done <= 1'b0;
    end else begin
      if (frame_end) begin
        has_conv <= '0;
        any_conv <= 1'b0;
        first_idx <= '0;
      end else if (stop) begin
        has_conv <= has_conv | wr;
        any_conv <= 1'b1;
        if (!any_conv) first_idx <= (mode == OP_SINGLE) ? widx : free_idx;
      end
      if (start) begin
        pend_v    <= 1'b0;
        gate_done <= 1'b0;
      end else begin
        pend_v    <= |det && !coinc && !gate_done;
        pend_t    <= last_t[FINE_W-1:0];
        if (coinc) gate_done <= 1'b1;
      end
    end
  end

  // at most one register written, and only together with a TDC stop
  a_wr_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr));
  a_wr_stop:   assert property (@(posedge clk) disable iff (!rst_n) (|wr) == stop);
endmodule

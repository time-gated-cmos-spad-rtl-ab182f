// pixel_tdc: the in-pixel part of the macropixel's shared TDC.
//
// A 7-bit coarse counter is cleared by the global START (one per gate window)
// and then counts reference-clock cycles; a STOP from the arbiter halts it and
// the STOP interpolator (phase_sampler + fine_interpolator) measures where in
// the reference period the photon arrived. A 6-bit gate counter, cleared at
// frame end and advanced by every START, is saved with each conversion so the
// result can be paired with the START fine time of the same gate. The
// conversion word is {gate, coarse, fine}; the measured interval is
// Tck*coarse + Tck/32*(fine - start_fine), as in the published TDC.
//
// Timing, with events given per clk (reference clock) cycle plus a 5-bit
// position inside it: a START in cycle cs arms the counter; a STOP in a later
// cycle cp yields coarse = cp - cs, visible on conv in the same cycle as stop
// (the arbiter writes it at the end of that cycle). Only one conversion per
// gate window is possible. A gate number of 0 marks an empty register, and
// gates beyond the 62nd do not convert; the counter saturates at 127 (full
// scale, about 300 ns) and then refuses stops. These three rules are this
// design's reading of the 6-bit gate counter and 62-gate frame limit.
module pixel_tdc (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        timing_en,  // TDC powered (not counting-only)
  input  logic                        frame_end,  // clears the gate counter
  input  logic                        start,      // global START, one per gate
  input  logic                        stop,       // from the arbiter
  input  logic [spad_pkg::FINE_W-1:0] stop_t,     // photon position in the clock period
  output logic                        ready,      // a stop this cycle will convert
  output spad_pkg::conv_t             conv        // result for a stop this cycle
);
  import spad_pkg::*;

  logic                running;
  logic [COARSE_W-1:0] coarse;
  logic [GATE_W-1:0]   gcnt;
  logic [NPHASE-1:0]   stop_phases;
  logic [FINE_W-1:0]   stop_fine;

  phase_sampler u_stop_arb (.t(stop_t), .flip('0), .phases(stop_phases));
  fine_interpolator u_stop_interp (.phases(stop_phases), .fine(stop_fine));

  assign ready = timing_en && running && !(&coarse) &&
                 (gcnt != '0) && (gcnt <= GATE_W'(MAX_GATES));

  assign conv.gate   = gcnt;
  assign conv.coarse = coarse + COARSE_W'(1);
  assign conv.fine   = stop_fine;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      coarse  <= '0;
      gcnt    <= '0;
    end else begin
      if (start) begin
        running <= timing_en;
        coarse  <= '0;
        if (frame_end)    gcnt <= GATE_W'(1);
        else if (!(&gcnt)) gcnt <= gcnt + GATE_W'(1);
      end else begin
        if (frame_end) gcnt <= '0;
        if (stop && ready)            running <= 1'b0;
        else if (running && !(&coarse)) coarse <= coarse + COARSE_W'(1);
      end
    end
  end
endmodule

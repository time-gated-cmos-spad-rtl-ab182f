// holdoff_counter: hold-off timer of one SPAD, counted in gate periods.
//
// After an avalanche (det) the SPAD is disarmed. The counter is advanced by
// rising edges of the global GATE signal; the SPAD is re-armed on the rising
// edge after holdoff_cfg complete gate periods have been skipped, so
// holdoff_cfg = 0 re-arms it at the next GATE rising edge and holdoff_cfg = 3
// keeps it off for three whole gate periods (as in the published design).
// A SPAD disabled by configuration is never armed.
//
// Timing: gate_rise is a one-cycle pulse in the clk domain. armed falls in
// the cycle after det and rises in the cycle after the re-arming gate_rise.
// After reset the SPAD is armed (this design's choice).
module holdoff_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       det,          // avalanche detected this cycle
  input  logic       gate_rise,    // rising edge of GATE
  input  logic [1:0] holdoff_cfg,  // gate periods to skip, 0..3
  input  logic       spad_en,      // configuration: SPAD enabled
  output logic       armed         // SPAD biased above breakdown when gated on
);
  logic       held;
  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= 1'b0;
      cnt  <= '0;
    end else if (det && !held) begin
      held <= 1'b1;
      cnt  <= '0;
    end else if (held && gate_rise) begin
      if (cnt >= holdoff_cfg) held <= 1'b0;
      else                    cnt  <= cnt + 2'd1;
    end
  end

  assign armed = spad_en && !held;
endmodule

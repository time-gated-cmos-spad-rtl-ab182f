// photon_counter: 5-bit event counter of one SPAD (or, in coincidence mode,
// of the macropixel's two-photon events).
//
// inc adds one, saturating at 31 (saturation is this design's choice: with
// up to 62 gates per frame a wrap would alias). clr, asserted at frame end,
// restarts the count; an inc in the same cycle is counted in the new frame.
// The count is visible the cycle after the increment.
module photon_counter #(
  parameter int unsigned W = spad_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (clr)               count <= W'(inc);
    else if (inc && !(&count))  count <= count + W'(1);
  end
endmodule

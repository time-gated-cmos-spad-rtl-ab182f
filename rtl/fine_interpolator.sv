// fine_interpolator: decodes the 16 clock-phase samples taken by an
// interpolator's arbiters into a 5-bit fine time (1/32 of the reference
// period, 75 ps at 420 MHz).
//
// The phases are sampled on both edges, so the 16 samples form a 32-state
// Johnson code: for an event in sub-interval t, phases 0..t are high when
// t < 16 and phases t-15..15 are high when t >= 16. Phase 0 tells which half
// of the period the event fell in and the number of high phases gives the
// position within it: t = ones - 1 when phase 0 is high, t = 31 - ones
// otherwise. Counting ones instead of locating the 0/1 boundary tolerates
// isolated bubbles (one arbiter resolving the wrong way) with an error of one
// LSB. The published design names the both-edge interpolator; the decoding
// rule is this design's. Purely combinational.
module fine_interpolator (
  input  logic [spad_pkg::NPHASE-1:0] phases,
  output logic [spad_pkg::FINE_W-1:0] fine
);
  logic [spad_pkg::FINE_W-1:0] ones;

  always_comb begin
    ones = '0;
    for (int k = 0; k < int'(spad_pkg::NPHASE); k++)
      ones = ones + spad_pkg::FINE_W'(phases[k]);
    if (phases[0]) fine = (ones == '0) ? '0 : ones - 5'd1;
    else           fine = 5'd31 - ones;
  end
endmodule

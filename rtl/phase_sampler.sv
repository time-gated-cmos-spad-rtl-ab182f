// phase_sampler: behavioural model of the arbiter bank of an interpolator
// together with the ideal multiphase clock it samples. Not synthesizable
// circuitry in the real chip: it stands for the analog clock generator and
// the sampling arbiters.
//
// The clock generator delivers 16 phases of the reference clock, phase k
// delayed by k x Tck/32 (75 ps at 420 MHz), each with a 50 % duty cycle.
// An event at sub-interval t (0..31, in units of Tck/32 after the reference
// clock rising edge) finds phase k high when (t - k) mod 32 < 16. Because
// both edges of every phase carry information, 16 lines resolve 32
// sub-intervals. flip injects a sampling error (metastable arbiter) on the
// selected bits, for testing the decoder's tolerance. Combinational.
module phase_sampler (
  input  logic [spad_pkg::FINE_W-1:0] t,       // event position in the clock period
  input  logic [spad_pkg::NPHASE-1:0] flip,    // arbiters that resolve wrongly
  output logic [spad_pkg::NPHASE-1:0] phases   // sampled phase levels
);
  always_comb begin
    for (int k = 0; k < int'(spad_pkg::NPHASE); k++) begin
      logic [spad_pkg::FINE_W-1:0] d;
      d         = t - spad_pkg::FINE_W'(k);
      phases[k] = (d < 5'd16) ^ flip[k];
    end
  end
endmodule

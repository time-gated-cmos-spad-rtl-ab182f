// tb_fine_interpolator: checks the Johnson-code decoder of the fine
// interpolator. For every sub-interval t the expected phase samples are
// built here from the clock waveforms (phase k rises at k*75 ps and has a
// 50 % duty cycle in a 2400 ps period) and the decoded code must equal t.
// Single-arbiter bubbles must cost at most one LSB.
module tb_fine_interpolator;
  logic [15:0] phases;
  logic [4:0]  fine;
  int checks = 0, failures = 0;

  fine_interpolator dut (.phases, .fine);

  function automatic logic [15:0] sample(int t);
    logic [15:0] p;
    for (int k = 0; k < 16; k++) begin
      int ps = ((t * 75 - k * 75) % 2400 + 2400) % 2400;
      p[k] = ps < 1200;
    end
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 32; t++) begin
      phases = sample(t);
      #1;
      checks++;
      if (fine !== 5'(t)) begin
        failures++;
        $display("FAIL t=%0d phases=%b fine=%0d", t, phases, fine);
      end
    end
    // bubbles: flip one phase away from phase 0 and the code boundary
    for (int t = 0; t < 32; t++) begin
      for (int k = 1; k < 16; k++) begin
        int d;
        phases = sample(t);
        phases[k] = !phases[k];
        #1;
        d = int'(fine) - t;
        if (d > 16) d -= 32;
        if (d < -16) d += 32;
        checks++;
        if (d > 1 || d < -1) begin
          failures++;
          $display("FAIL bubble t=%0d k=%0d fine=%0d", t, k, fine);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

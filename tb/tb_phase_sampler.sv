// tb_phase_sampler: checks the behavioural arbiter-bank model against the
// clock waveforms computed in picoseconds (75 ps phase step, 2400 ps
// period, 50 % duty cycle) and checks that flip inverts the chosen samples.
module tb_phase_sampler;
  logic [4:0]  t;
  logic [15:0] flip, phases;
  int checks = 0, failures = 0;

  phase_sampler dut (.t, .flip, .phases);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tt = 0; tt < 32; tt++) begin
      for (int f = 0; f < 3; f++) begin
        logic [15:0] exp;
        t    = 5'(tt);
        flip = (f == 0) ? 16'h0 : 16'(1 << ((tt + f * 5) % 16));
        for (int k = 0; k < 16; k++) begin
          int ps;
          ps = ((tt * 75 - k * 75) % 2400 + 2400) % 2400;
          exp[k] = (ps < 1200) ^ flip[k];
        end
        #1;
        checks++;
        if (phases !== exp) begin
          failures++;
          $display("FAIL t=%0d flip=%h phases=%b exp=%b", tt, flip, phases, exp);
        end
      end
    end
    // each sub-interval gives a distinct sample word
    checks++;
    begin
      logic [15:0] seen [32];
      int dup = 0;
      for (int tt = 0; tt < 32; tt++) begin
        t = 5'(tt); flip = '0; #1; seen[tt] = phases;
        for (int u = 0; u < tt; u++) if (seen[u] == phases) dup++;
      end
      if (dup != 0) begin failures++; $display("FAIL %0d duplicate codes", dup); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

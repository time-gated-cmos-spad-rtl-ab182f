// tb_macropixel: one macropixel through eight frames that walk through the
// operating modes (single photon, two-photon coincidence), the readout
// modes (full, fast, fast with counts, counting only), hold-off settings 0..3,
// a disabled SPAD, counting or timing switched off and frames of 64 gates
// (one with photons only from gate 62 on) and photons near the end of
// the TDC range.
// Random photons are applied cycle by cycle; the reference model
// (tb_spad_model) predicts the readout words. Each frame is read out with
// row-clock pulses while the next frame is acquired, and every word is
// compared. Mechanisms that never occurred count as failures.
module tb_macropixel;
  import spad_pkg::*;
  import tb_spad_model::*;
  logic clk = 0, rst_n = 0;
  op_mode_e mode = OP_SINGLE;
  ro_mode_e ro_mode = RO_FULL;
  logic timing_en = 1, count_en = 1;
  logic [1:0] holdoff_cfg = 0;
  logic [3:0] spad_en = 4'hf;
  logic gate = 0, start = 0, frame_end = 0;
  logic [3:0] photon = 0;
  logic [3:0][4:0] photon_t = '0;
  logic clk_in = 0, sel_in = 1, clk_out, sel_out, bus_en;
  logic [22:0] bus_data;
  int checks = 0, failures = 0;
  logic [22:0] expq [$];
  mp_model m;

  macropixel dut (.clk, .rst_n, .mode, .ro_mode, .timing_en, .count_en, .holdoff_cfg,
    .spad_en, .gate, .start, .frame_end, .photon, .photon_t,
    .clk_in, .sel_in, .clk_out, .sel_out, .bus_en, .bus_data);

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // readout: a row-clock pulse every 4th cycle while the pixel owns the bus
  initial begin
    forever begin
      repeat (3) @(negedge clk);
      if (bus_en && !frame_end) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected word %h", bus_data);
        end else begin
          logic [22:0] e;
          e = expq.pop_front();
          if (bus_data !== e) begin
            failures++; $display("FAIL word %h exp %h", bus_data, e);
          end
        end
        clk_in = 1;
        @(negedge clk) clk_in = 0;
      end
    end
  end

  task automatic run_gate(int style);
    ph_t q [$];
    int last = 1;
    gen_photons(style, q);
    m.run_gate(q);
    foreach (q[i]) if (q[i].d > last) last = q[i].d;
    @(negedge clk) begin gate = 1; start = 1; end
    @(negedge clk) start = 0;
    for (int d = 1; d <= last; d++) begin
      photon = '0;
      foreach (q[i]) if (q[i].d == d) begin
        photon[q[i].spad] = 1; photon_t[q[i].spad] = 5'(q[i].slot);
      end
      if (d < last) @(negedge clk);
    end
    @(negedge clk) begin photon = '0; gate = 0; end
    @(negedge clk);
  endtask

  task automatic end_frame();
    m.end_frame();
    @(negedge clk) frame_end = 1;
    // the old frame must be fully read by now
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words not read", expq.size()); end
    foreach (m.words[i]) expq.push_back(m.words[i]);
    @(negedge clk) frame_end = 0;
  endtask

  initial begin
    struct { op_mode_e md; ro_mode_e ro; int ho; bit te, ce; logic [3:0] en; int ng, style; } fr [10];
    fr[0] = '{OP_SINGLE, RO_FULL,     0, 1, 1, 4'hf, 62, 0};
    fr[1] = '{OP_SINGLE, RO_FAST_CNT, 2, 1, 1, 4'hf, 64, 1};
    fr[2] = '{OP_COINC,  RO_FULL,     1, 1, 1, 4'hf, 62, 2};
    fr[3] = '{OP_COINC,  RO_FAST,     0, 1, 1, 4'hf, 30, 2};
    fr[4] = '{OP_SINGLE, RO_COUNT,    0, 0, 1, 4'hf, 62, 1};
    fr[5] = '{OP_SINGLE, RO_FAST,     3, 1, 0, 4'hb, 40, 1};
    fr[6] = '{OP_COINC,  RO_FAST_CNT, 0, 1, 1, 4'hf, 62, 2};
    fr[7] = '{OP_SINGLE, RO_FULL,     1, 1, 1, 4'h7, 62, 1};
    fr[8] = '{OP_SINGLE, RO_FULL,     0, 1, 1, 4'hf, 64, 3};  // photons only from gate 62
    fr[9] = '{OP_SINGLE, RO_FULL,     0, 1, 1, 4'hf, 12, 4};  // near full scale
    m = new();
    repeat (2) @(negedge clk);
    rst_n = 1;
    end_frame();
    for (int f = 0; f < 10; f++) begin
      mode = fr[f].md; ro_mode = fr[f].ro; holdoff_cfg = 2'(fr[f].ho);
      timing_en = fr[f].te; count_en = fr[f].ce; spad_en = fr[f].en;
      m.mode = mode; m.ro_mode = ro_mode; m.hcfg = fr[f].ho;
      m.timing_en = fr[f].te; m.count_en = fr[f].ce;
      for (int k = 0; k < 4; k++) m.en[k] = fr[f].en[k];
      for (int g = 0; g < fr[f].ng; g++)
        run_gate(fr[f].style != 3 ? fr[f].style : (g >= 61 ? 1 : -1));
      end_frame();
    end
    repeat (100) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words left", expq.size()); end
    print_counts();
    checks++;
    if (n_conv_single == 0 || n_conv_coinc == 0 || n_coinc_wrap == 0 || n_holdoff_block == 0 ||
        n_stored_block == 0 || n_overflow == 0 || n_late_gate == 0 || n_saturate == 0 ||
        n_disabled == 0 || n_fast_block == 0 || n_regs_full == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_row: a full row of 16 macropixels. Random photons (a different
// pattern style per macropixel and gate) are applied for five frames in
// different modes, and the row is read out through its row clock while the
// next frame is acquired. The words must come out pixel after pixel in
// column order, exactly as the reference model predicts, with busy high
// only while words remain; the row clock must reach the last pixel.
module tb_pixel_row;
  import spad_pkg::*;
  import tb_spad_model::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0;
  op_mode_e mode = OP_SINGLE;
  ro_mode_e ro_mode = RO_FULL;
  logic timing_en = 1, count_en = 1;
  logic [1:0] holdoff_cfg = 0;
  logic [NC-1:0][3:0] spad_en;
  logic gate = 0, start = 0, frame_end = 0;
  logic [NC-1:0][3:0] photon;
  logic [NC-1:0][3:0][4:0] photon_t;
  logic row_clk = 0, busy;
  logic [22:0] bus;
  int checks = 0, failures = 0, nwords = 0;
  logic [22:0] expq [$];
  mp_model m [NC];

  pixel_row #(.N_COLS(NC)) dut (.clk, .rst_n, .mode, .ro_mode, .timing_en, .count_en,
    .holdoff_cfg, .spad_en, .gate, .start, .frame_end, .photon, .photon_t,
    .row_clk, .busy, .bus);

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // row clock every other cycle while the row has data
  initial begin
    forever begin
      @(negedge clk);
      if (busy && !frame_end) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected word %h", bus);
        end else begin
          logic [22:0] e;
          e = expq.pop_front();
          if (bus !== e) begin failures++; $display("FAIL word %h exp %h col %0d t=%0t", bus, e, $clog2(dut.bus_en), $time); end
        end
        nwords++;
        row_clk = 1;
        @(negedge clk) row_clk = 0;
      end
    end
  end

  task automatic run_gate(int style);
    ph_t q [NC][$];
    int last = 1;
    for (int c = 0; c < NC; c++) begin
      int st;
      st = (style == 2) ? 2 : ((c + $urandom) % 3 == 0 ? 1 : style);
      gen_photons(st, q[c]);
      m[c].run_gate(q[c]);
      foreach (q[c][i]) if (q[c][i].d > last) last = q[c][i].d;
    end
    @(negedge clk) begin gate = 1; start = 1; end
    @(negedge clk) start = 0;
    for (int d = 1; d <= last; d++) begin
      photon = '0;
      for (int c = 0; c < NC; c++)
        foreach (q[c][i]) if (q[c][i].d == d) begin
          photon[c][q[c][i].spad] = 1; photon_t[c][q[c][i].spad] = 5'(q[c][i].slot);
        end
      if (d < last) @(negedge clk);
    end
    @(negedge clk) begin photon = '0; gate = 0; end
    @(negedge clk);
  endtask

  task automatic end_frame();
    @(negedge clk) frame_end = 1;
    $display("frame end t=%0t", $time);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words not read", expq.size()); end
    for (int c = 0; c < NC; c++) begin
      m[c].end_frame();
      foreach (m[c].words[i]) expq.push_back(m[c].words[i]);
    end
    @(negedge clk) frame_end = 0;
  endtask

  initial begin
    struct { op_mode_e md; ro_mode_e ro; int ho; bit te, ce; int ng, style; } fr [5];
    fr[0] = '{OP_SINGLE, RO_FULL,     0, 1, 1, 62, 0};
    fr[1] = '{OP_COINC,  RO_FULL,     1, 1, 1, 40, 2};
    fr[2] = '{OP_SINGLE, RO_FAST_CNT, 2, 1, 1, 30, 0};
    fr[3] = '{OP_COINC,  RO_FAST,     0, 1, 1, 30, 2};
    fr[4] = '{OP_SINGLE, RO_COUNT,    0, 0, 1, 40, 1};
    photon = '0; photon_t = '0;
    for (int c = 0; c < NC; c++) begin
      m[c] = new();
      spad_en[c] = (c == 5) ? 4'b1101 : 4'hf;
      for (int k = 0; k < 4; k++) m[c].en[k] = spad_en[c][k];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    end_frame();
    for (int f = 0; f < 5; f++) begin
      mode = fr[f].md; ro_mode = fr[f].ro; holdoff_cfg = 2'(fr[f].ho);
      timing_en = fr[f].te; count_en = fr[f].ce;
      for (int c = 0; c < NC; c++) begin
        m[c].mode = mode; m[c].ro_mode = ro_mode; m[c].hcfg = fr[f].ho;
        m[c].timing_en = fr[f].te; m[c].count_en = fr[f].ce;
      end
      for (int g = 0; g < fr[f].ng; g++) run_gate(fr[f].style);
      end_frame();
    end
    repeat (200) @(negedge clk);
    checks++;
    if (expq.size() != 0 || busy) begin failures++; $display("FAIL %0d words left", expq.size()); end
    // total words: 64 + 64 + 32 + 16 + 16 + 16 (initial empty frame in full mode first)
    checks++;
    if (nwords != 64 + 64 + 64 + 32 + 16 + 16) begin
      failures++; $display("FAIL %0d words read", nwords);
    end
    print_counts();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

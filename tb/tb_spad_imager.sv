// tb_spad_imager: end-to-end test of the whole imager at its default size
// (32x32 SPADs, 16x16 macropixels). Six frames with random photons on every
// macropixel walk through single-photon and two-photon-coincidence modes,
// all four readout modes, hold-off settings, disabled SPADs, counting or
// timing switched off and a 64-gate frame. The readout stream (one row per
// master readout cycle) runs while the next frame is acquired; every word
// is compared with the reference model per row, and the START memory is
// read back for the previous frame during acquisition. The readout must take
// 16 master cycles per word of a row: 1024 cycles for a full-mode frame
// (4 cycles per macropixel), 256 in the one-word modes. Each mechanism the
// design implements must occur at least once.
module tb_spad_imager;
  import spad_pkg::*;
  import tb_spad_model::*;
  localparam int NR = 16, NC = 16;
  logic clk = 0, rst_n = 0;
  op_mode_e mode = OP_SINGLE;
  ro_mode_e ro_mode = RO_FULL;
  logic timing_en = 1, count_en = 1;
  logic [1:0] holdoff_cfg = 0;
  logic spad_en [2*NR][2*NC];
  logic gate = 0, start = 0, frame_end = 0;
  logic [4:0] start_t = 0;
  logic photon [2*NR][2*NC];
  logic [4:0] photon_t [2*NR][2*NC];
  logic ro_en = 0, ro_valid;
  logic [22:0] ro_data;
  logic [3:0] ro_row;
  logic [5:0] smem_addr = 0, gate_count;
  logic [4:0] smem_data;
  int checks = 0, failures = 0, nwords = 0, n_smem = 0, n_overlap = 0;
  logic [22:0] expq [NR][$];
  logic [4:0] start_ref [2][64];
  int prev_ng = 0, cur_bank = 0;
  // readout rate: master cycles from frame_end to the frame's last word
  int cyc = 0, fe_cyc = 0, last_cyc = 0, cur_wpr = 0, n_rate = 0;
  mp_model m [NR][NC];

  spad_imager dut (.clk, .rst_n, .mode, .ro_mode, .timing_en, .count_en, .holdoff_cfg,
    .spad_en, .gate, .start, .start_t, .frame_end, .photon, .photon_t,
    .ro_en, .ro_valid, .ro_data, .ro_row, .smem_addr, .smem_data, .gate_count);

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // master readout clock runs continuously; check every valid word
  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      ro_en <= 1;
      if (ro_valid) begin
        last_cyc = cyc;
        checks++;
        nwords++;
        if (gate) n_overlap++;
        if (expq[ro_row].size() == 0) begin
          failures++; $display("FAIL row %0d unexpected word %h", ro_row, ro_data);
        end else begin
          logic [22:0] e;
          e = expq[ro_row].pop_front();
          if (ro_data !== e) begin
            failures++; $display("FAIL row %0d word %h exp %h", ro_row, ro_data, e);
          end
        end
      end
    end
  end

  task automatic run_gate(int style, int g);
    ph_t q [NR][NC][$];
    int last = 1;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        int st;
        st = (style >= 2) ? style : (($urandom % 3 == 0) ? 1 : style);
        gen_photons(st, q[r][c]);
        m[r][c].run_gate(q[r][c]);
        foreach (q[r][c][i]) if (q[r][c][i].d > last) last = q[r][c][i].d;
      end
    // START memory of the previous frame, read while this frame runs
    if (g <= prev_ng && g <= 62) begin
      smem_addr = 6'(g);
      #1 checks++;
      n_smem++;
      if (smem_data !== start_ref[1 - cur_bank][g]) begin
        failures++; $display("FAIL START memory gate %0d: %0d exp %0d", g, smem_data,
                             start_ref[1 - cur_bank][g]);
      end
    end
    @(negedge clk) begin gate = 1; start = 1; start_t = 5'($urandom); end
    if (g <= 62) start_ref[cur_bank][g] = start_t;
    @(negedge clk) start = 0;
    checks++;
    if (gate_count !== 6'(g > 63 ? 63 : g)) begin
      failures++; $display("FAIL gate count %0d exp %0d", gate_count, g);
    end
    for (int d = 1; d <= last; d++) begin
      for (int y = 0; y < 2*NR; y++) for (int x = 0; x < 2*NC; x++) photon[y][x] = 0;
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++)
          foreach (q[r][c][i]) if (q[r][c][i].d == d) begin
            int k = q[r][c][i].spad;
            photon[2*r + k/2][2*c + k%2] = 1;
            photon_t[2*r + k/2][2*c + k%2] = 5'(q[r][c][i].slot);
          end
      if (d < last) @(negedge clk);
    end
    @(negedge clk) begin
      for (int y = 0; y < 2*NR; y++) for (int x = 0; x < 2*NC; x++) photon[y][x] = 0;
      gate = 0;
    end
    @(negedge clk);
  endtask

  // a frame of W words per row needs 16*W master cycles (1024 in full mode)
  task automatic check_rate();
    if (cur_wpr > 0) begin
      checks++;
      n_rate++;
      $display("readout of %0d words per row took %0d master cycles", cur_wpr, last_cyc - fe_cyc);
      // +2: the load edge of frame_end and the output register
      if (last_cyc - fe_cyc != 16 * cur_wpr + 2) begin
        failures++; $display("FAIL readout rate");
      end
    end
  endtask

  task automatic end_frame(int ng);
    @(negedge clk) frame_end = 1;
    check_rate();
    fe_cyc = cyc;
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (expq[r].size() != 0) begin
        failures++; $display("FAIL row %0d: %0d words not read", r, expq[r].size());
      end
      for (int c = 0; c < NC; c++) begin
        m[r][c].end_frame();
        foreach (m[r][c].words[i]) expq[r].push_back(m[r][c].words[i]);
      end
    end
    cur_wpr = expq[0].size();
    prev_ng = ng;
    cur_bank = 1 - cur_bank;
    @(negedge clk) frame_end = 0;
  endtask

  initial begin
    struct { op_mode_e md; ro_mode_e ro; int ho; bit te, ce; int ng, style; } fr [6];
    int total_exp;
    fr[0] = '{OP_SINGLE, RO_FULL,     0, 1, 1, 62, 0};
    fr[1] = '{OP_COINC,  RO_FULL,     1, 1, 1, 64, 2};
    fr[2] = '{OP_SINGLE, RO_FAST_CNT, 2, 1, 1, 40, 1};
    fr[3] = '{OP_COINC,  RO_FAST_CNT, 0, 1, 1, 30, 2};
    fr[4] = '{OP_SINGLE, RO_COUNT,    0, 0, 1, 62, 1};
    fr[5] = '{OP_SINGLE, RO_FAST,     3, 1, 0, 20, 4};
    for (int y = 0; y < 2*NR; y++)
      for (int x = 0; x < 2*NC; x++) begin
        photon[y][x] = 0; photon_t[y][x] = 0;
        spad_en[y][x] = ($urandom % 50) != 0;
      end
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        m[r][c] = new();
        for (int k = 0; k < 4; k++) m[r][c].en[k] = spad_en[2*r + k/2][2*c + k%2];
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    end_frame(0);
    total_exp = 1024;
    for (int f = 0; f < 6; f++) begin
      mode = fr[f].md; ro_mode = fr[f].ro; holdoff_cfg = 2'(fr[f].ho);
      timing_en = fr[f].te; count_en = fr[f].ce;
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++) begin
          m[r][c].mode = mode; m[r][c].ro_mode = ro_mode; m[r][c].hcfg = fr[f].ho;
          m[r][c].timing_en = fr[f].te; m[r][c].count_en = fr[f].ce;
        end
      for (int g = 1; g <= fr[f].ng; g++) run_gate(fr[f].style, g);
      end_frame(fr[f].ng);
      total_exp += 256 * ((fr[f].ro == RO_FULL) ? 4 :
                          (fr[f].ro == RO_FAST_CNT && fr[f].md == OP_SINGLE) ? 2 : 1);
    end
    repeat (1200) @(negedge clk);
    check_rate();
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (expq[r].size() != 0) begin failures++; $display("FAIL row %0d words left", r); end
    end
    checks++;
    if (nwords != total_exp) begin
      failures++; $display("FAIL %0d words read, expected %0d", nwords, total_exp);
    end
    print_counts();
    $display("readout words %0d (%0d during gate windows), START memory reads %0d",
             nwords, n_overlap, n_smem);
    checks++;
    if (n_conv_single == 0 || n_conv_coinc == 0 || n_coinc_wrap == 0 || n_holdoff_block == 0 ||
        n_stored_block == 0 || n_overflow == 0 || n_late_gate == 0 || n_saturate == 0 ||
        n_disabled == 0 || n_fast_block == 0 || n_regs_full == 0 || n_overlap == 0 ||
        n_smem == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

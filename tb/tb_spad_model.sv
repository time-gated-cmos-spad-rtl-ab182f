// tb_spad_model: reference model of one macropixel for the testbenches,
// written gate by gate from the behaviour the imager specifies rather than
// cycle by cycle like the RTL:
//  - at each GATE rising edge held-off SPADs count one gate and re-arm after
//    holdoff_cfg+1 edges; a photon on an armed, enabled SPAD is an avalanche;
//  - single mode: the earliest avalanche (ties to the lower SPAD) of a SPAD
//    with no stored conversion is converted, one per gate;
//  - coincidence mode: the first avalanche that follows another by at most
//    13 sub-intervals is a two-photon event (one per gate), counted in
//    counter 0 and stored in the next free register;
//  - a conversion needs the TDC enabled, gate number 1..62 and an arrival
//    at most 127 reference cycles after START; fast readout keeps only one;
//  - counters saturate at 31; at frame end the data moves to the output
//    registers and the readout words are formed.
// It also counts how often each mechanism occurred.
package tb_spad_model;
  import spad_pkg::*;

  typedef struct {
    int spad;   // 0..3
    int d;      // reference cycles after START (>= 1)
    int slot;   // position in the period, 0..31
  } ph_t;

  // mechanism counters shared by all models
  int n_conv_single, n_conv_coinc, n_coinc, n_coinc_wrap, n_holdoff_block,
      n_stored_block, n_overflow, n_late_gate, n_saturate, n_disabled,
      n_fast_block, n_regs_full, n_tie;

  class mp_model;
    op_mode_e mode = OP_SINGLE;
    ro_mode_e ro_mode = RO_FULL;
    bit timing_en = 1, count_en = 1;
    int hcfg = 0;
    bit en [4] = '{1, 1, 1, 1};

    bit held [4];
    int hcnt [4];
    int cnt  [4];
    conv_t conv [4];
    bit has [4];
    bit any;
    int first_idx;
    int g;
    // output registers
    logic [22:0] words [$];

    function new();
      for (int k = 0; k < 4; k++) begin held[k] = 0; hcnt[k] = 0; cnt[k] = 0;
        conv[k] = '0; has[k] = 0; end
      any = 0; first_idx = 0; g = 0;
    endfunction

    function void count(int k);
      if (cnt[k] == 31) n_saturate++;
      else cnt[k]++;
    endfunction

    // one gate window with its photons
    function void run_gate(ph_t ph [$]);
      ph_t av [$];
      bit tdc_free;
      // gate rising edge
      for (int k = 0; k < 4; k++)
        if (held[k]) begin
          if (hcnt[k] >= hcfg) held[k] = 0;
          else hcnt[k]++;
        end
      if (g < 63) g++;
      // avalanches in time order
      ph.sort() with (item.d * 32 + item.slot);
      for (int i = 0; i < ph.size(); i++) begin
        int k = ph[i].spad;
        if (!en[k]) begin n_disabled++; continue; end
        if (held[k]) begin n_holdoff_block++; continue; end
        held[k] = 1; hcnt[k] = 0;
        av.push_back(ph[i]);
      end
      // stable order for equal times: lower SPAD first
      av.sort() with ((item.d * 32 + item.slot) * 4 + item.spad);
      tdc_free = 1;
      if (mode == OP_SINGLE) begin
        if (count_en) foreach (av[i]) count(av[i].spad);
        foreach (av[i]) begin
          int k = av[i].spad;
          if (i > 0 && av[i].d == av[i-1].d && av[i].slot == av[i-1].slot) n_tie++;
          if (!tdc_free) break;
          if (has[k]) begin n_stored_block++; continue; end
          if (!timing_en) break;
          if (any && (ro_mode == RO_FAST || ro_mode == RO_FAST_CNT)) begin n_fast_block++; break; end
          if (g > 62) begin n_late_gate++; break; end
          if (av[i].d > 127) begin n_overflow++; break; end
          conv[k] = '{gate: 6'(g), coarse: 7'(av[i].d), fine: 5'(av[i].slot)};
          has[k] = 1;
          if (!any) first_idx = k;
          any = 1;
          tdc_free = 0;
          n_conv_single++;
        end
      end else begin
        for (int i = 1; i < av.size(); i++) begin
          int dt = (av[i].d * 32 + av[i].slot) - (av[i-1].d * 32 + av[i-1].slot);
          if (dt <= 13) begin
            int r = -1;
            n_coinc++;
            if (av[i].d != av[i-1].d) n_coinc_wrap++;
            if (count_en) count(0);
            for (int q = 3; q >= 0; q--) if (!has[q]) r = q;
            if (!timing_en) break;
            if (any && (ro_mode == RO_FAST || ro_mode == RO_FAST_CNT)) begin n_fast_block++; break; end
            if (g > 62) begin n_late_gate++; break; end
            if (av[i].d > 127) begin n_overflow++; break; end
            if (r < 0) begin n_regs_full++; break; end
            conv[r] = '{gate: 6'(g), coarse: 7'(av[i].d), fine: 5'(av[i].slot)};
            has[r] = 1;
            if (!any) first_idx = r;
            any = 1;
            n_conv_coinc++;
            break;
          end
        end
      end
    endfunction

    // frame end: form the readout words of this frame and clear
    function void end_frame();
      logic [22:0] wc, wf;
      words.delete();
      wc = {3'b0, 5'(cnt[3]), 5'(cnt[2]), 5'(cnt[1]), 5'(cnt[0])};
      wf = (mode == OP_SINGLE) ? {3'b0, 2'(first_idx), conv[first_idx]}
                               : {5'(cnt[0]), conv[0]};
      case (ro_mode)
        RO_FULL:     for (int k = 0; k < 4; k++) words.push_back({5'(cnt[k]), conv[k]});
        RO_FAST:     words.push_back(wf);
        RO_FAST_CNT: begin if (mode == OP_SINGLE) words.push_back(wc); words.push_back(wf); end
        default:     words.push_back(wc);
      endcase
      for (int k = 0; k < 4; k++) begin cnt[k] = 0; conv[k] = '0; has[k] = 0; end
      any = 0; first_idx = 0; g = 0;
    endfunction
  endclass


  // Random photons of one macropixel for one gate window. style 0: sparse,
  // 1: dense (every SPAD, often twice), 2: clustered around one instant so
  // that pairs fall inside and outside the coincidence window. A few photons
  // arrive late (120..135 cycles) to reach the end of the TDC range. No SPAD
  // gets two photons in one reference cycle. style < 0: no photons; 4: all
  // photons around the end of the TDC range.
  function automatic void gen_photons(int style, ref ph_t q [$]);
    int base;
    q.delete();
    if (style < 0) return;   // a gate without photons
    base = 1 + int'($urandom % 30);
    if ($urandom % 16 == 0) base = 120 + int'($urandom % 16);
    for (int k = 0; k < 4; k++) begin
      int nph;
      case (style)
        0: nph = ($urandom % 4 == 0) ? 1 : 0;
        1: nph = 1 + int'($urandom % 2);
        default: nph = ($urandom % 3 == 0) ? 0 : 1;
      endcase
      for (int n = 0; n < nph; n++) begin
        ph_t p;
        int t;
        p.spad = k;
        if (style == 2) t = base * 32 + 12 + int'($urandom % 28);
        else t = (1 + int'($urandom % 30)) * 32 + int'($urandom % 32);
        if (style == 4) t = (125 + int'($urandom % 10)) * 32 + int'($urandom % 32);
        else if (style != 2 && $urandom % 16 == 0) t = (120 + int'($urandom % 16)) * 32 + int'($urandom % 32);
        if (n == 1) t = q[q.size()-1].d * 32 + 32 + int'($urandom % 200);
        p.d = t / 32;
        p.slot = t % 32;
        q.push_back(p);
      end
    end
  endfunction

  function automatic void print_counts();
    $display("mechanisms: single conv %0d, two-photon events %0d (across cycle %0d, converted %0d),",
             n_conv_single, n_coinc, n_coinc_wrap, n_conv_coinc);
    $display("  hold-off blocked %0d, stored SPAD skipped %0d, TDC overflow %0d, gate>62 %0d,",
             n_holdoff_block, n_stored_block, n_overflow, n_late_gate);
    $display("  counter saturated %0d, disabled SPAD %0d, fast-mode blocked %0d, registers full %0d, ties %0d",
             n_saturate, n_disabled, n_fast_block, n_regs_full, n_tie);
  endfunction
endpackage

// tb_pixel_arbiter: directed cases for both operating modes, with expected
// decisions worked out by hand from the arbitration rules:
//  single mode  - earliest photon wins, ties to the lower SPAD, a SPAD that
//                 already stored a conversion is skipped, no stop without a
//                 ready TDC, counts follow the avalanches;
//  coincidence  - a pair within 13 sub-intervals triggers at the second
//                 photon, also across a cycle boundary; wider pairs do not;
//                 one event per gate; registers fill in order; counter 0
//                 counts two-photon events;
//  fast readout - only one conversion per frame.
module tb_pixel_arbiter;
  import spad_pkg::*;
  logic clk = 0, rst_n = 0;
  op_mode_e mode = OP_SINGLE;
  logic fast = 0, count_en = 1, start = 0, frame_end = 0, tdc_ready = 1;
  logic [3:0] det = 0;
  logic [3:0][4:0] det_t = '0;
  logic stop, coinc;
  logic [4:0] stop_t;
  logic [3:0] wr, cnt_inc;
  logic [1:0] first_idx;
  int checks = 0, failures = 0;
  int n_coinc = 0;

  pixel_arbiter dut (.clk, .rst_n, .mode, .fast, .count_en, .start, .frame_end,
    .det, .det_t, .tdc_ready, .stop, .stop_t, .wr, .cnt_inc, .first_idx, .coinc);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one cycle of photons and check the combinational decision
  task automatic step(input logic [3:0] d, input int t0, t1, t2, t3,
                      input logic exp_stop, input int exp_t,
                      input logic [3:0] exp_wr, input logic [3:0] exp_inc, input string what);
    @(negedge clk);
    det = d;
    det_t = {5'(t3), 5'(t2), 5'(t1), 5'(t0)};
    #1;
    checks++;
    if (stop !== exp_stop || (exp_stop && stop_t !== 5'(exp_t)) || wr !== exp_wr ||
        cnt_inc !== exp_inc) begin
      failures++;
      $display("FAIL %s: stop=%b t=%0d wr=%b inc=%b (exp %b %0d %b %b)", what,
               stop, stop_t, wr, cnt_inc, exp_stop, exp_t, exp_wr, exp_inc);
    end
    if (coinc) n_coinc++;
    @(negedge clk);
    det = 0;
  endtask

  task automatic pulse_start();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
  endtask

  task automatic pulse_frame();
    @(negedge clk) frame_end = 1;
    @(negedge clk) frame_end = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    pulse_frame();
    // ---------------- single-photon mode
    pulse_start();
    step(4'b0101, 10, 0, 4, 0, 1, 4, 4'b0100, 4'b0101, "earliest wins");
    pulse_start();
    step(4'b0101, 20, 0, 1, 0, 1, 20, 4'b0001, 4'b0101, "stored SPAD skipped");
    pulse_start();
    step(4'b1010, 0, 7, 0, 7, 1, 7, 4'b0010, 4'b1010, "tie to lower index");
    pulse_start();
    tdc_ready = 0;
    step(4'b1000, 0, 0, 0, 9, 0, 0, 4'b0000, 4'b1000, "TDC not ready");
    tdc_ready = 1;
    step(4'b1111, 1, 2, 3, 30, 1, 30, 4'b1000, 4'b1111, "only SPAD 3 eligible");
    pulse_start();
    step(4'b1111, 1, 2, 3, 4, 0, 0, 4'b0000, 4'b1111, "all stored");
    count_en = 0;
    step(4'b0011, 1, 2, 3, 4, 0, 0, 4'b0000, 4'b0000, "counting disabled");
    count_en = 1;
    // the last sub-interval of the period must win like any other
    pulse_frame();
    pulse_start();
    step(4'b0001, 31, 0, 0, 0, 1, 31, 4'b0001, 4'b0001, "slot 31 alone");
    // fast readout: one conversion per frame
    pulse_frame();
    fast = 1;
    pulse_start();
    step(4'b0110, 0, 12, 11, 0, 1, 11, 4'b0100, 4'b0110, "fast first");
    checks++;
    if (first_idx !== 2'd2) begin failures++; $display("FAIL first_idx %0d", first_idx); end
    pulse_start();
    step(4'b0001, 3, 0, 0, 0, 0, 0, 4'b0000, 4'b0001, "fast budget used");
    fast = 0;
    // ---------------- two-photon coincidence mode
    pulse_frame();
    mode = OP_COINC;
    pulse_start();
    step(4'b0011, 5, 15, 0, 0, 1, 15, 4'b0001, 4'b0001, "pair in window");
    pulse_start();
    step(4'b0011, 0, 20, 0, 0, 0, 0, 4'b0000, 4'b0000, "pair too wide");
    pulse_start();
    @(negedge clk); det = 4'b0100; det_t = {5'd0, 5'd28, 5'd0, 5'd0};
    @(negedge clk); det = 4'b1000; det_t = {5'd6, 5'd0, 5'd0, 5'd0};
    #1; checks++;
    if (!(stop && stop_t == 5'd6 && wr == 4'b0010 && cnt_inc == 4'b0001)) begin
      failures++; $display("FAIL pair across cycle stop=%b t=%0d wr=%b", stop, stop_t, wr);
    end
    if (coinc) n_coinc++;
    @(negedge clk); det = 0;
    pulse_start();
    @(negedge clk); det = 4'b0100; det_t = {5'd0, 5'd10, 5'd0, 5'd0};
    @(negedge clk); det = 4'b1000; det_t = {5'd20, 5'd0, 5'd0, 5'd0};
    #1; checks++;
    if (stop || coinc) begin failures++; $display("FAIL wide pair across cycle triggered"); end
    @(negedge clk); det = 0;
    pulse_start();
    step(4'b0111, 0, 14, 20, 0, 1, 20, 4'b0100, 4'b0001, "chain: second opener");
    step(4'b1000, 0, 0, 0, 22, 0, 0, 4'b0000, 4'b0000, "one event per gate");
    pulse_start();
    tdc_ready = 0;
    step(4'b1001, 3, 0, 0, 3, 0, 0, 4'b0000, 4'b0001, "counted without TDC");
    tdc_ready = 1;
    pulse_start();
    step(4'b1001, 3, 0, 0, 9, 1, 9, 4'b1000, 4'b0001, "last register");
    pulse_start();
    step(4'b1001, 3, 0, 0, 9, 0, 0, 4'b0000, 4'b0001, "registers full");
    checks++;
    if (n_coinc != 6) begin failures++; $display("FAIL coincidences %0d", n_coinc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

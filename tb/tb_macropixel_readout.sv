// tb_macropixel_readout: loads known frame data into the output registers
// and reads it back with row-clock pulses in every readout mode and both
// operating modes. Checks the words in order, the number of words (4 / 1 /
// 2 or 1 / 1), bus ownership only while sel_in is high, that the row clock
// is passed on only after the last word, and that acquisition data changing
// after frame_end does not disturb the readout (double buffering).
module tb_macropixel_readout;
  import spad_pkg::*;
  logic clk = 0, rst_n = 0, frame_end = 0, clk_in = 0, sel_in = 0;
  frame_data_t acq;
  op_mode_e mode = OP_SINGLE;
  ro_mode_e ro_mode = RO_FULL;
  logic clk_out, sel_out, bus_en;
  logic [22:0] bus_data;
  int checks = 0, failures = 0;

  macropixel_readout dut (.clk, .rst_n, .frame_end, .acq, .mode, .ro_mode,
    .clk_in, .sel_in, .clk_out, .sel_out, .bus_en, .bus_data);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    sel_in = 1;
    #1 expect_true(!bus_en && sel_out, "empty after reset");
    for (int m = 0; m < 2; m++) begin
      for (int r = 0; r < 4; r++) begin
        frame_data_t d;
        logic [22:0] exp [4];
        int nexp;
        mode = m ? OP_COINC : OP_SINGLE;
        ro_mode = ro_mode_e'(r);
        for (int k = 0; k < 4; k++) begin
          d.conv[k] = 18'($urandom);
          d.cnt[k]  = 5'($urandom);
        end
        d.first_idx = 2'($urandom);
        // expected words from the readout word definitions
        case (r)
          0: begin nexp = 4; for (int k = 0; k < 4; k++) exp[k] = {d.cnt[k], d.conv[k]}; end
          3: begin nexp = 1; exp[0] = {3'b0, d.cnt[3], d.cnt[2], d.cnt[1], d.cnt[0]}; end
          default: begin
            logic [22:0] wf;
            wf = m ? {d.cnt[0], d.conv[0]} : {3'b0, d.first_idx, d.conv[d.first_idx]};
            if (r == 2 && m == 0) begin
              nexp = 2; exp[0] = {3'b0, d.cnt[3], d.cnt[2], d.cnt[1], d.cnt[0]}; exp[1] = wf;
            end else begin
              nexp = 1; exp[0] = wf;
            end
          end
        endcase
        sel_in = 0;
        acq = d;
        @(negedge clk) frame_end = 1;
        @(negedge clk) frame_end = 0;
        acq = ~d;   // next frame's acquisition must not leak through
        #1 expect_true(!bus_en && !sel_out, "waits for sel_in");
        @(negedge clk) sel_in = 1;
        for (int w = 0; w < nexp; w++) begin
          #1;
          expect_true(bus_en && bus_data == exp[w] && !sel_out,
                      $sformatf("mode %0d ro %0d word %0d: %h exp %h en=%b", m, r, w,
                                bus_data, exp[w], bus_en));
          @(negedge clk) clk_in = 1;
          #1 expect_true(!clk_out, "pulse consumed");
          @(negedge clk) clk_in = 0;
        end
        #1 expect_true(!bus_en && sel_out, $sformatf("mode %0d ro %0d done", m, r));
        @(negedge clk) clk_in = 1;
        #1 expect_true(clk_out, "pulse passed on");
        @(negedge clk) clk_in = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

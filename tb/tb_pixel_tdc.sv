// tb_pixel_tdc: runs 66 gate windows through the in-pixel TDC. Each gate
// has a START followed, d reference cycles later, by a STOP at a random
// position in the period. The conversion must carry the gate number, a
// coarse count of d and the STOP position; STOPs past full scale (d > 127),
// a second STOP in the same gate, gates beyond the 62nd and a disabled TDC
// must not convert.
module tb_pixel_tdc;
  import spad_pkg::*;
  logic clk = 0, rst_n = 0;
  logic timing_en = 1, frame_end = 0, start = 0, stop = 0;
  logic [4:0] stop_t = 0;
  logic ready;
  conv_t conv;
  int checks = 0, failures = 0;

  pixel_tdc dut (.clk, .rst_n, .timing_en, .frame_end, .start, .stop, .stop_t, .ready, .conv);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    @(negedge clk) frame_end = 1;
    @(negedge clk) frame_end = 0;
    for (int g = 1; g <= 66; g++) begin
      int d;
      logic [4:0] t;
      d = (g % 11 == 0) ? 128 + int'($urandom % 4) : (g == 5 ? 127 : 1 + int'($urandom % 126));
      t = 5'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      repeat (d - 1) @(negedge clk);
      stop = 1; stop_t = t;
      #1;
      if (g <= 62 && d <= 127) begin
        expect_true(ready, $sformatf("gate %0d d=%0d ready", g, d));
        expect_true(conv.gate == 6'(g) && conv.coarse == 7'(d) && conv.fine == t,
                    $sformatf("gate %0d d=%0d conv=%0d/%0d/%0d", g, d,
                              conv.gate, conv.coarse, conv.fine));
      end else begin
        expect_true(!ready, $sformatf("gate %0d d=%0d must not convert", g, d));
      end
      @(negedge clk) stop = 1; stop_t = 5'd3;
      #1 expect_true(!ready, $sformatf("gate %0d second stop", g));
      @(negedge clk) stop = 0;
      repeat (2) @(negedge clk);
    end
    // a new frame restarts the gate numbers; a disabled TDC never converts
    @(negedge clk) frame_end = 1;
    @(negedge clk) frame_end = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (9) @(negedge clk);
    #1 expect_true(ready && conv.gate == 6'd1 && conv.coarse == 7'd10, "new frame gate 1");
    timing_en = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (3) @(negedge clk);
    #1 expect_true(!ready, "timing disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

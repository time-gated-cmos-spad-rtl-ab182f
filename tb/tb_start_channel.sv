// tb_start_channel: three frames of START pulses with random positions.
// After each frame_end the previous frame's START fine times must be
// readable at their gate numbers 1..62 while the new frame is being written;
// the gate count must follow the STARTs and saturate at 63, and STARTs past
// the 62nd must not overwrite anything.
module tb_start_channel;
  logic clk = 0, rst_n = 0, frame_end = 0, start = 0;
  logic [4:0] start_t = 0, rd_data;
  logic [5:0] rd_addr = 0, gate_num;
  int checks = 0, failures = 0;
  logic [4:0] ref_mem [2][64];

  start_channel dut (.clk, .rst_n, .frame_end, .start, .start_t, .rd_addr, .rd_data, .gate_num);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ngates [3] = '{62, 64, 40};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) frame_end = 1;
    @(negedge clk) frame_end = 0;
    for (int f = 0; f < 3; f++) begin
      for (int g = 1; g <= ngates[f]; g++) begin
        @(negedge clk);
        start = 1; start_t = 5'($urandom);
        if (g <= 62) ref_mem[f % 2][g] = start_t;
        @(negedge clk) start = 0;
        checks++;
        if (gate_num !== 6'((g > 63) ? 63 : g)) begin
          failures++; $display("FAIL frame %0d gate_num %0d exp %0d", f, gate_num, g);
        end
        // read back the previous frame meanwhile
        if (f > 0 && g <= ngates[f-1] && g <= 62) begin
          rd_addr = 6'(g);
          #1 checks++;
          if (rd_data !== ref_mem[(f-1) % 2][g]) begin
            failures++; $display("FAIL frame %0d addr %0d: %0d exp %0d", f-1, g, rd_data,
                                 ref_mem[(f-1) % 2][g]);
          end
        end
        repeat (3) @(negedge clk);
      end
      @(negedge clk) frame_end = 1;
      @(negedge clk) frame_end = 0;
      checks++;
      if (gate_num !== 0) begin failures++; $display("FAIL gate_num not cleared"); end
    end
    for (int g = 1; g <= 40; g++) begin
      rd_addr = 6'(g);
      #1 checks++;
      if (rd_data !== ref_mem[0][g]) begin failures++; $display("FAIL last frame addr %0d", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

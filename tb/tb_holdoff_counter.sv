// tb_holdoff_counter: for every hold-off setting (0..3) an avalanche must
// disarm the SPAD, and the SPAD must come back exactly at GATE rising edge
// number setting+1 after the avalanche. A disabled SPAD must stay unarmed.
module tb_holdoff_counter;
  logic clk = 0, rst_n = 0;
  logic det = 0, gate_rise = 0, spad_en = 1;
  logic [1:0] holdoff_cfg = 0;
  logic armed;
  int checks = 0, failures = 0;

  holdoff_counter dut (.clk, .rst_n, .det, .gate_rise, .holdoff_cfg, .spad_en, .armed);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp, string what);
    checks++;
    if (armed !== exp) begin
      failures++;
      $display("FAIL %s: armed=%b exp=%b", what, armed, exp);
    end
  endtask

  task automatic gate_edge();
    @(negedge clk) gate_rise = 1;
    @(negedge clk) gate_rise = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(1, "after reset");
    for (int cfg = 0; cfg < 4; cfg++) begin
      holdoff_cfg = 2'(cfg);
      @(negedge clk) det = 1;
      @(negedge clk) det = 0;
      check(0, "after avalanche");
      for (int g = 1; g <= cfg + 1; g++) begin
        gate_edge();
        check((g == cfg + 1) ? 1'b1 : 1'b0, $sformatf("cfg %0d gate %0d", cfg, g));
      end
    end
    // a second avalanche while held off changes nothing
    holdoff_cfg = 2'd1;
    @(negedge clk) det = 1;
    @(negedge clk) det = 1;
    @(negedge clk) det = 0;
    gate_edge();
    check(0, "held, 1 gate");
    gate_edge();
    check(1, "rearmed after 2 gates");
    spad_en = 0;
    @(negedge clk);
    check(0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

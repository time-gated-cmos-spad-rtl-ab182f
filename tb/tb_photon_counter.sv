// tb_photon_counter: counts random increment patterns against a saturating
// reference, and checks the frame clear (including an increment in the clear
// cycle, which belongs to the new frame).
module tb_photon_counter;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int ref_cnt = 0;

  photon_counter dut (.clk, .rst_n, .clr, .inc, .count);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (count !== 5'(ref_cnt)) begin
        failures++;
        $display("FAIL cycle %0d count=%0d exp=%0d", n, count, ref_cnt);
      end
      inc = ($urandom % 3) != 0;
      clr = ($urandom % 97) == 0;
      if (clr) ref_cnt = int'(inc);
      else if (inc && ref_cnt < 31) ref_cnt++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

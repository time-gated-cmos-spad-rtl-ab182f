// tb_row_selector: every row bus carries a word tagged with its row number
// and a pulse counter. With the master readout enable active on random
// cycles, the selector must visit rows 0..15 in order, capture the selected
// row's bus and busy line, and send exactly one row-clock pulse to that row
// at the same edge, so each row sees its own pulse once every 16 ro_en.
module tb_row_selector;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, ro_en = 0;
  logic [N-1:0][22:0] row_bus;
  logic [N-1:0] row_busy, row_clk;
  logic ro_valid;
  logic [22:0] ro_data;
  logic [3:0] ro_row;
  int checks = 0, failures = 0;
  int pulses [N];

  row_selector #(.N_ROWS(N)) dut (.clk, .rst_n, .ro_en, .row_bus, .row_busy, .row_clk,
    .ro_valid, .ro_data, .ro_row);

  always #5 clk = !clk;

  // each row's bus shows how many row clocks it has received
  always_comb
    for (int r = 0; r < N; r++) begin
      row_bus[r]  = {4'(r), 19'(pulses[r])};
      row_busy[r] = (r % 3) != 1;
    end

  always_ff @(posedge clk)
    for (int r = 0; r < N; r++)
      if (rst_n && row_clk[r]) pulses[r] <= pulses[r] + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    for (int r = 0; r < N; r++) pulses[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (n < 100) begin
      @(negedge clk);
      ro_en = ($urandom % 3) == 0;
      #1;
      if (ro_en) begin
        checks++;
        if (row_clk !== 16'(1 << (n % N))) begin
          failures++; $display("FAIL row_clk %b at read %0d", row_clk, n);
        end
        @(negedge clk);
        ro_en = 0;
        #1 checks++;
        if (ro_row !== 4'(n % N) || ro_data !== {4'(n % N), 19'(n / N)} ||
            ro_valid !== ((n % N) % 3 != 1)) begin
          failures++;
          $display("FAIL read %0d: row %0d data %h valid %b", n, ro_row, ro_data, ro_valid);
        end
        n++;
      end else begin
        checks++;
        if (row_clk !== '0) begin failures++; $display("FAIL row_clk without ro_en"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

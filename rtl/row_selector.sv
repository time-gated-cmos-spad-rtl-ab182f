// row_selector: connects the row buses to the common output bus and times
// the row clocks.
//
// A one-hot pattern circulates in an N_ROWS-bit shift register, enabling a
// new row on every master readout clock (ro_en, a clock enable in this
// design). At that edge the selected row's bus is captured into the output
// register and a row-clock pulse is sent to that row, so its pixels move to
// their next word and have N_ROWS-1 master cycles to drive the row bus before
// it is selected again. Only this block and the output bus run at the full
// readout rate, as in the published design.
//
// Timing: ro_data/ro_valid/ro_row are registered and valid from the cycle
// after an ro_en; ro_valid is the captured busy line of the row.
module row_selector #(
  parameter int unsigned N_ROWS = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ro_en,
  input  logic [N_ROWS-1:0][spad_pkg::WORD_W-1:0] row_bus,
  input  logic [N_ROWS-1:0]           row_busy,
  output logic [N_ROWS-1:0]           row_clk,
  output logic                        ro_valid,
  output logic [spad_pkg::WORD_W-1:0] ro_data,
  output logic [$clog2(N_ROWS)-1:0]   ro_row
);
  import spad_pkg::*;
  localparam int unsigned RW = $clog2(N_ROWS);

  logic [N_ROWS-1:0]   sel;
  logic [RW-1:0]       cur;
  logic [WORD_W-1:0]   mux_data;
  logic                mux_busy;

  // one-hot to index and output-bus three-state buffers (AND-OR)
  always_comb begin
    cur      = '0;
    mux_data = '0;
    mux_busy = 1'b0;
    for (int r = 0; r < N_ROWS; r++)
      if (sel[r]) begin
        cur      = RW'(r);
        mux_data = mux_data | row_bus[r];
        mux_busy = mux_busy | row_busy[r];
      end
  end

  assign row_clk = ro_en ? sel : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= N_ROWS'(1);
      ro_valid <= 1'b0;
      ro_data  <= '0;
      ro_row   <= '0;
    end else if (ro_en) begin
      sel      <= {sel[N_ROWS-2:0], sel[N_ROWS-1]};
      ro_valid <= mux_busy;
      ro_data  <= mux_data;
      ro_row   <= cur;
    end else begin
      ro_valid <= 1'b0;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));
endmodule

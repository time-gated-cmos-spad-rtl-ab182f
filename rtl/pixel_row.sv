// pixel_row: one row of macropixels sharing a 23-bit row bus.
//
// The row clock enters at column 0 and is passed from pixel to pixel by the
// readout state machines, so only one pixel at a time owns the bus and no
// column-select lines exist. The three-state bus drivers are modelled by an
// AND-OR of the enabled pixels' words; busy is high while any pixel drives
// the bus (an extra line of this design, used as the output-valid flag).
// An assertion checks that at most one driver is enabled.
//
// Interface: per-SPAD inputs are indexed [column of macropixel][SPAD 0..3];
// all macropixels share configuration, GATE, START and frame_end. row_clk is
// a one-cycle clock-enable pulse from the row selector.
module pixel_row #(
  parameter int unsigned N_COLS = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  spad_pkg::op_mode_e          mode,
  input  spad_pkg::ro_mode_e          ro_mode,
  input  logic                        timing_en,
  input  logic                        count_en,
  input  logic [1:0]                  holdoff_cfg,
  input  logic [N_COLS-1:0][spad_pkg::NSPAD-1:0] spad_en,
  input  logic                        gate,
  input  logic                        start,
  input  logic                        frame_end,
  input  logic [N_COLS-1:0][spad_pkg::NSPAD-1:0] photon,
  input  logic [N_COLS-1:0][spad_pkg::NSPAD-1:0][spad_pkg::FINE_W-1:0] photon_t,
  input  logic                        row_clk,
  output logic                        busy,
  output logic [spad_pkg::WORD_W-1:0] bus
);
  import spad_pkg::*;

  logic [N_COLS:0]   clk_chain, sel_chain;
  logic [N_COLS-1:0] bus_en;
  logic [N_COLS-1:0][WORD_W-1:0] bus_data;

  assign clk_chain[0] = row_clk;
  assign sel_chain[0] = 1'b1;

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    macropixel u_mp (
      .clk, .rst_n, .mode, .ro_mode, .timing_en, .count_en, .holdoff_cfg,
      .spad_en(spad_en[c]), .gate, .start, .frame_end,
      .photon(photon[c]), .photon_t(photon_t[c]),
      .clk_in(clk_chain[c]), .sel_in(sel_chain[c]),
      .clk_out(clk_chain[c+1]), .sel_out(sel_chain[c+1]),
      .bus_en(bus_en[c]), .bus_data(bus_data[c]));
  end

  always_comb begin
    bus = '0;
    for (int c = 0; c < N_COLS; c++)
      if (bus_en[c]) bus = bus | bus_data[c];
  end
  assign busy = |bus_en;

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bus_en));
endmodule

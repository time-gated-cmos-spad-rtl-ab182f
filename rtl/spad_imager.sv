// spad_imager: time-gated 32x32 SPAD imager with shared in-pixel timing
// electronics.
//
// The array is N_ROWS x N_COLS macropixels of 2x2 SPADs (16x16 by default).
// Every macropixel counts photons per SPAD and, through its arbiter, shares
// one TDC among its four SPADs, in single-photon or two-photon-coincidence
// mode. A global GATE enables the SPADs; a global START, one per gate window,
// restarts the coarse counters and is time-stamped by the START channel,
// whose memory is indexed by the gate number each conversion carries. At
// frame_end every macropixel moves its results into its output registers;
// they are then read out row-parallel while the next frame is acquired: the
// row selector enables one row per ro_en, captures its bus onto the output
// bus and clocks the row, and inside each row the row clock passes from
// pixel to pixel.
//
// Ports: photon[y][x] / photon_t[y][x] give a photon on SPAD (y, x) in this
// clk (420 MHz reference clock) cycle and its arrival position in Tck/32
// (75 ps) units; start_t likewise for START. spad_en[y][x] enables SPADs.
// The readout stream is ro_valid/ro_data/ro_row; the previous frame's START
// fine times are read at smem_addr (gate number) on smem_data.
//
// The multiphase clock generator (DLL, phase interpolator, edge combiner,
// tuning buffers) and the SPAD/quenching front ends are analog: the photon and
// START positions stand for the instants their arbiters sample. One clock
// domain is used; the master readout clock is a clock enable (ro_en), which
// is this design's simplification. Assertions check the two usage rules:
// START only with GATE high, frame_end only with GATE low.
module spad_imager #(
  parameter int unsigned N_ROWS = 16,   // macropixel rows
  parameter int unsigned N_COLS = 16    // macropixel columns
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration
  input  spad_pkg::op_mode_e          mode,
  input  spad_pkg::ro_mode_e          ro_mode,
  input  logic                        timing_en,
  input  logic                        count_en,
  input  logic [1:0]                  holdoff_cfg,
  input  logic                        spad_en  [2*N_ROWS][2*N_COLS],
  // acquisition
  input  logic                        gate,
  input  logic                        start,
  input  logic [spad_pkg::FINE_W-1:0] start_t,
  input  logic                        frame_end,
  input  logic                        photon   [2*N_ROWS][2*N_COLS],
  input  logic [spad_pkg::FINE_W-1:0] photon_t [2*N_ROWS][2*N_COLS],
  // readout
  input  logic                        ro_en,
  output logic                        ro_valid,
  output logic [spad_pkg::WORD_W-1:0] ro_data,
  output logic [$clog2(N_ROWS)-1:0]   ro_row,
  input  logic [spad_pkg::GATE_W-1:0] smem_addr,
  output logic [spad_pkg::FINE_W-1:0] smem_data,
  output logic [spad_pkg::GATE_W-1:0] gate_count  // STARTs in this frame (saturates at 63)
);
  import spad_pkg::*;

  logic [N_ROWS-1:0][WORD_W-1:0] row_bus;
  logic [N_ROWS-1:0]             row_busy, row_clk;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    logic [N_COLS-1:0][NSPAD-1:0]             en_r, ph_r;
    logic [N_COLS-1:0][NSPAD-1:0][FINE_W-1:0] pt_r;
    for (genvar c = 0; c < N_COLS; c++) begin : g_map
      for (genvar k = 0; k < NSPAD; k++) begin : g_spad
        assign en_r[c][k] = spad_en [2*r + k/2][2*c + k%2];
        assign ph_r[c][k] = photon  [2*r + k/2][2*c + k%2];
        assign pt_r[c][k] = photon_t[2*r + k/2][2*c + k%2];
      end
    end
    pixel_row #(.N_COLS(N_COLS)) u_row (
      .clk, .rst_n, .mode, .ro_mode, .timing_en, .count_en, .holdoff_cfg,
      .spad_en(en_r), .gate, .start, .frame_end, .photon(ph_r), .photon_t(pt_r),
      .row_clk(row_clk[r]), .busy(row_busy[r]), .bus(row_bus[r]));
  end

  row_selector #(.N_ROWS(N_ROWS)) u_rowsel (
    .clk, .rst_n, .ro_en, .row_bus, .row_busy, .row_clk,
    .ro_valid, .ro_data, .ro_row);

  start_channel u_start (
    .clk, .rst_n, .frame_end, .start, .start_t,
    .rd_addr(smem_addr), .rd_data(smem_data), .gate_num(gate_count));

  // usage rules: START opens a gate window; a frame ends between windows
  a_start_in_gate:  assert property (@(posedge clk) disable iff (!rst_n) start |-> gate);
  a_frame_end_idle: assert property (@(posedge clk) disable iff (!rst_n) frame_end |-> !gate);
endmodule

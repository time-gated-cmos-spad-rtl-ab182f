// start_channel: the global START interpolator and START memory bank.
//
// Each START (one per gate window, synchronous with the laser) is measured by
// the START interpolator against the reference clock; the 5-bit fine time is
// written to the memory at the address of the gate number (1..62), the same
// number every macropixel TDC saves with its conversions, so conversions and
// START times can be paired off-chip. The memory has two banks swapped at
// frame_end (this design's choice, matching the double-buffered pixels): the
// host reads the previous frame's START times through rd_addr/rd_data
// (combinational read) while the current frame is written.
module start_channel (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          frame_end,
  input  logic                          start,
  input  logic [spad_pkg::FINE_W-1:0]   start_t,   // START position in the period
  input  logic [spad_pkg::GATE_W-1:0]   rd_addr,
  output logic [spad_pkg::FINE_W-1:0]   rd_data,
  output logic [spad_pkg::GATE_W-1:0]   gate_num   // gates started in this frame
);
  import spad_pkg::*;
  localparam int unsigned DEPTH = 2**GATE_W;

  logic [FINE_W-1:0] mem [2][DEPTH];
  logic              wbank;
  logic [GATE_W-1:0] gnext;
  logic [NPHASE-1:0] start_phases;
  logic [FINE_W-1:0] start_fine;

  phase_sampler u_start_arb (.t(start_t), .flip('0), .phases(start_phases));
  fine_interpolator u_start_interp (.phases(start_phases), .fine(start_fine));

  assign gnext = frame_end ? GATE_W'(1) : ((&gate_num) ? gate_num : gate_num + GATE_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank    <= 1'b0;
      gate_num <= '0;
    end else begin
      if (frame_end) wbank <= !wbank;
      if (start)          gate_num <= gnext;
      else if (frame_end) gate_num <= '0;
    end
  end

  // the bank being written is the one selected after a frame_end in the same cycle
  always_ff @(posedge clk)
    if (start && gnext <= GATE_W'(MAX_GATES))
      mem[wbank ^ frame_end][gnext] <= start_fine;

  assign rd_data = mem[!wbank][rd_addr];
endmodule

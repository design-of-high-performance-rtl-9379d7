// icw: incoming cell writer.
//
// A cell arrives as CELL_BEATS beats of BEAT_W bits on consecutive clocks,
// starting at phase 0 of a cell slot (`in_valid` high on every beat). The
// first beat is the cell header; its top N_PORTS bits are the destination
// bitmap (one bit per output port, several bits for a multicast cell).
// The writer collects the beats in a one-cell register. At the end of the
// slot it presents the header (`hdr_valid`, `hdr_bitmap`) to the policing and
// write pointer blocks for the next slot. If the cell is accepted (`accept`
// at phase 0 with the buffer address `wr_cell`), the writer copies the held
// beats into the cell buffer memory at {wr_cell, beat} on phases
// 0 .. CELL_BEATS-1 of that slot, while the next cell's beats replace them
// in the register one clock at a time. A refused cell is simply not written.
// The buffer memory is 72 bits wide, A chip (bits 71:36) and B chip
// (bits 35:0). The header layout and the one-slot store-and-forward delay are
// this design's choices; the writer's role follows the design description.
module icw #(
  parameter int unsigned N_PORTS     = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW     = bm_pkg::CELL_AW,
  parameter int unsigned BEAT_W      = bm_pkg::BEAT_W,
  parameter int unsigned CELL_BEATS  = bm_pkg::CELL_BEATS,
  parameter int unsigned SLOT_CYCLES = bm_pkg::SLOT_CYCLES,
  localparam int unsigned PW         = $clog2(SLOT_CYCLES),
  localparam int unsigned BW         = $clog2(CELL_BEATS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PW-1:0]           phase,
  // cell input
  input  logic                    in_valid,
  input  logic [BEAT_W-1:0]       in_data,
  // header of the cell held for this slot
  output logic                    hdr_valid,
  output logic [N_PORTS-1:0]      hdr_bitmap,
  // write decision, phase 0
  input  logic                    accept,
  input  logic [CELL_AW-1:0]      wr_cell,
  // cell buffer memory write port
  output logic                    bm_wr_en,
  output logic [CELL_AW+BW-1:0]   bm_wr_addr,
  output logic [BEAT_W-1:0]       bm_wr_data
);
  logic [CELL_BEATS-1:0][BEAT_W-1:0] cbuf;
  logic                              got;       // a cell started this slot
  logic                              writing;
  logic [CELL_AW-1:0]                wcell;

  wire in_beats = (phase < PW'(CELL_BEATS));
  wire [BW-1:0] beat = BW'(phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cbuf       <= '0;
      got        <= 1'b0;
      hdr_valid  <= 1'b0;
      hdr_bitmap <= '0;
      writing    <= 1'b0;
      wcell      <= '0;
    end else begin
      if (in_beats && in_valid) cbuf[beat] <= in_data;
      if (phase == '0) got <= in_valid;
      if (phase == PW'(SLOT_CYCLES - 1)) begin
        hdr_valid  <= got;
        hdr_bitmap <= cbuf[0][BEAT_W-1 -: N_PORTS];
      end
      if (phase == '0) begin
        writing <= accept && hdr_valid;
        wcell   <= wr_cell;
      end else if (phase == PW'(CELL_BEATS - 1)) begin
        writing <= 1'b0;
      end
    end
  end

  // Beat k of the held cell is written at phase k; at phase 0 the decision
  // is taken on the same clock.
  always_comb begin
    bm_wr_en   = in_beats && ((phase == '0) ? (accept && hdr_valid) : writing);
    bm_wr_addr = {(phase == '0) ? wr_cell : wcell, beat};
    bm_wr_data = cbuf[beat];
  end

  a_burst: assert property (@(posedge clk) disable iff (!rst_n)
                            (phase != '0 && in_beats && got) |-> in_valid);
endmodule

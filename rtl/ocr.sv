// ocr: outgoing cell reader.
//
// At phase 0 of a slot the reader takes the granted output port (from the
// request FIFO controller on the ingress side, or from the queue selection on
// the egress side) and passes it to the read pointer manager. On phase 1 the
// RPM returns the head address of that queue; the reader then tells the
// policing module that one cell left the queue and reads the cell's beats
// from the cell buffer memory at {address, beat} on phases 1 .. CELL_BEATS.
// The memory returns data one clock later, so the cell leaves on `out_*` on
// phases 2 .. CELL_BEATS+1, with `out_sop` on the first beat and `out_port`
// naming the output port it was granted for.
// The block's role follows the design description; the phase plan is this
// design's.
module ocr #(
  parameter int unsigned N_PORTS     = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW     = bm_pkg::CELL_AW,
  parameter int unsigned BEAT_W      = bm_pkg::BEAT_W,
  parameter int unsigned CELL_BEATS  = bm_pkg::CELL_BEATS,
  parameter int unsigned SLOT_CYCLES = bm_pkg::SLOT_CYCLES,
  localparam int unsigned PTW        = $clog2(N_PORTS),
  localparam int unsigned PW         = $clog2(SLOT_CYCLES),
  localparam int unsigned BW         = $clog2(CELL_BEATS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PW-1:0]         phase,
  input  logic                  sel_valid,
  input  logic [PTW-1:0]        sel_port,
  // to / from the read pointer manager
  output logic                  rpm_grant_valid,
  output logic [PTW-1:0]        rpm_grant_port,
  input  logic                  rpm_valid,
  input  logic [CELL_AW-1:0]    rpm_addr,
  input  logic [PTW-1:0]        rpm_port,
  // to the policing module
  output logic                  depart,
  output logic [PTW-1:0]        depart_port,
  // cell buffer memory read port
  output logic                  bm_rd_en,
  output logic [CELL_AW+BW-1:0] bm_rd_addr,
  input  logic [BEAT_W-1:0]     bm_rd_data,
  // cell output
  output logic                  out_valid,
  output logic                  out_sop,
  output logic [PTW-1:0]        out_port,
  output logic [BEAT_W-1:0]     out_data
);
  logic         rd_d, sop_d;
  logic [PW-1:0] beat_ph;

  assign rpm_grant_valid = (phase == '0) && sel_valid;
  assign rpm_grant_port  = sel_port;
  assign depart          = (phase == PW'(1)) && rpm_valid;
  assign depart_port     = rpm_port;

  assign beat_ph   = phase - PW'(1);
  assign bm_rd_en  = rpm_valid && (phase >= PW'(1)) && (phase <= PW'(CELL_BEATS));
  assign bm_rd_addr = {rpm_addr, BW'(beat_ph)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_d     <= 1'b0;
      sop_d    <= 1'b0;
      out_port <= '0;
    end else begin
      rd_d  <= bm_rd_en;
      sop_d <= bm_rd_en && (phase == PW'(1));
      if (bm_rd_en) out_port <= rpm_port;
    end
  end

  assign out_valid = rd_d;
  assign out_sop   = sop_d;
  assign out_data  = bm_rd_data;
endmodule

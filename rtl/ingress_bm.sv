// ingress_bm: ingress buffer manager of one switch port.
//
// Buffers the cells a port processor sends into the switch, in one virtual
// output queue per output port, and hands them to the crossbar when the
// central arbiter grants them. It combines the buffer engine (cell writer,
// pointer managers, idle queue, VOQ registers, policing, cell reader) with
// the backpressure controller (BPC), which carries the engine's arrival and
// multicast-stitch events to the request FIFO controller (RFC), and the RFC,
// which turns queued cells into requests and grants into reads.
//
// Timing: `arb_req` changes once per slot, at the end of a slot, and holds one
// request bit per VOQ for the slot that follows. A grant is presented on
// `arb_grant_valid`/`arb_grant_port` and sampled at the end of a slot; the
// granted cell leaves on `out_*` in the next slot, phases 2-7. The arbiter
// may answer up to RFC_DEPTH slots after the request.
// The structure follows the design description; the timing is this
// design's.
module ingress_bm #(
  parameter int unsigned N_PORTS     = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW     = bm_pkg::CELL_AW,
  parameter int unsigned PTR_W       = bm_pkg::PTR_W,
  parameter int unsigned BEAT_W      = bm_pkg::BEAT_W,
  parameter int unsigned CELL_BEATS  = bm_pkg::CELL_BEATS,
  parameter int unsigned SLOT_CYCLES = bm_pkg::SLOT_CYCLES,
  parameter int unsigned Q_LIMIT     = bm_pkg::Q_LIMIT,
  parameter int unsigned RFC_DEPTH   = bm_pkg::RFC_DEPTH,
  localparam int unsigned PTW        = $clog2(N_PORTS),
  localparam int unsigned PW         = $clog2(SLOT_CYCLES),
  localparam int unsigned BW         = $clog2(CELL_BEATS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic                          init_done,
  output logic                          soc,
  output logic                          slot_end,
  input  logic                          in_valid,
  input  logic [BEAT_W-1:0]             in_data,
  output logic                          out_valid,
  output logic                          out_sop,
  output logic [PTW-1:0]                out_port,
  output logic [BEAT_W-1:0]             out_data,
  // central arbiter
  output logic [N_PORTS-1:0]            arb_req,
  input  logic                          arb_grant_valid,
  input  logic [PTW-1:0]                arb_grant_port,
  // status
  output logic                          drop,
  output logic                          st_valid,
  output logic                          err,
  output logic                          spurious,
  output logic [CELL_AW:0]              free_cnt,
  output logic [N_PORTS-1:0][CELL_AW:0] q_len,
  // INPM
  output logic                          pm_rd_en,
  output logic [CELL_AW:0]              pm_rd_addr,
  input  logic [PTR_W-1:0]              pm_rd_data,
  output logic                          pm_wr_en,
  output logic [CELL_AW:0]              pm_wr_addr,
  output logic [PTR_W-1:0]              pm_wr_data,
  // INBM
  output logic                          bm_wr_en,
  output logic [CELL_AW+BW-1:0]         bm_wr_addr,
  output logic [BEAT_W-1:0]             bm_wr_data,
  output logic                          bm_rd_en,
  output logic [CELL_AW+BW-1:0]         bm_rd_addr,
  input  logic [BEAT_W-1:0]             bm_rd_data
);
  logic [PW-1:0]           phase;
  logic                    arr_valid;
  logic [PTW-1:0]          arr_port, st_port;
  logic [N_PORTS-1:0][1:0] inc;
  logic                    gv;
  logic [PTW-1:0]          gp;
  logic [31:0]             drop_cnt;
  logic [N_PORTS-1:0][CELL_AW:0]   rfc_len;
  logic [N_PORTS-1:0][RFC_DEPTH-1:0] rfc_fifo;

  bm_engine #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .PTR_W(PTR_W),
              .BEAT_W(BEAT_W), .CELL_BEATS(CELL_BEATS),
              .SLOT_CYCLES(SLOT_CYCLES), .Q_LIMIT(Q_LIMIT)) u_engine (
    .clk, .rst_n, .init_done, .phase, .soc, .slot_end,
    .in_valid, .in_data, .sel_valid(gv), .sel_port(gp),
    .out_valid, .out_sop, .out_port, .out_data,
    .arr_valid, .arr_port, .st_valid, .st_port,
    .drop, .drop_cnt, .err, .free_cnt, .q_len,
    .pm_rd_en, .pm_rd_addr, .pm_rd_data, .pm_wr_en, .pm_wr_addr, .pm_wr_data,
    .bm_wr_en, .bm_wr_addr, .bm_wr_data, .bm_rd_en, .bm_rd_addr, .bm_rd_data);

  bpc #(.N_PORTS(N_PORTS)) u_bpc (
    .clk, .rst_n, .slot_end, .arr_valid, .arr_port, .st_valid, .st_port, .inc);

  rfc #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .DEPTH(RFC_DEPTH)) u_rfc (
    .clk, .rst_n, .slot_end, .inc, .arb_grant_valid, .arb_grant_port,
    .arb_req, .ocr_grant_valid(gv), .ocr_grant_port(gp), .spurious,
    .len(rfc_len), .fifo(rfc_fifo));
endmodule

// buffer_manager_top: ingress and egress buffer managers of one switch port.
//
// One port card of an input-queued cell switch carries two buffer managers.
// The ingress one queues the cells that the port processor sends into the
// fabric, one virtual output queue per output port, asks the central arbiter
// for crossbar slots and sends each granted cell to the crossbar. The egress
// one queues the cells that arrive from the crossbar, in one output queue per
// queue number given in the cell header, and sends them on to the port
// processor. Both use the same pipelined buffer engine; each has its own
// pointer memory and cell buffer memory (INPM/INBM, EGPM/EGBM), which are
// external synchronous SRAMs and are reached through this module's ports.
//
// Ports prefixed ig_ belong to the ingress manager, eg_ to the egress
// manager. Both run on the same clock and reset and each has its own cell
// slot counter starting at reset. The egress queue to serve is chosen
// outside (`eg_sel_valid`/`eg_sel_port`, sampled at phase 0 of a slot): the
// egress scheduling policy is not part of this design.
module buffer_manager_top #(
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
  // ---------------- ingress ----------------
  output logic                          ig_init_done,
  output logic                          ig_soc,
  output logic                          ig_slot_end,
  input  logic                          ig_in_valid,
  input  logic [BEAT_W-1:0]             ig_in_data,
  output logic                          ig_out_valid,
  output logic                          ig_out_sop,
  output logic [PTW-1:0]                ig_out_port,
  output logic [BEAT_W-1:0]             ig_out_data,
  output logic [N_PORTS-1:0]            ig_arb_req,
  input  logic                          ig_arb_grant_valid,
  input  logic [PTW-1:0]                ig_arb_grant_port,
  output logic                          ig_drop,
  output logic                          ig_stitch,
  output logic                          ig_err,
  output logic                          ig_spurious,
  output logic [CELL_AW:0]              ig_free_cnt,
  output logic [N_PORTS-1:0][CELL_AW:0] ig_q_len,
  output logic                          inpm_rd_en,
  output logic [CELL_AW:0]              inpm_rd_addr,
  input  logic [PTR_W-1:0]              inpm_rd_data,
  output logic                          inpm_wr_en,
  output logic [CELL_AW:0]              inpm_wr_addr,
  output logic [PTR_W-1:0]              inpm_wr_data,
  output logic                          inbm_wr_en,
  output logic [CELL_AW+BW-1:0]         inbm_wr_addr,
  output logic [BEAT_W-1:0]             inbm_wr_data,
  output logic                          inbm_rd_en,
  output logic [CELL_AW+BW-1:0]         inbm_rd_addr,
  input  logic [BEAT_W-1:0]             inbm_rd_data,
  // ---------------- egress -----------------
  output logic                          eg_init_done,
  output logic                          eg_soc,
  input  logic                          eg_in_valid,
  input  logic [BEAT_W-1:0]             eg_in_data,
  input  logic                          eg_sel_valid,
  input  logic [PTW-1:0]                eg_sel_port,
  output logic                          eg_out_valid,
  output logic                          eg_out_sop,
  output logic [PTW-1:0]                eg_out_port,
  output logic [BEAT_W-1:0]             eg_out_data,
  output logic                          eg_drop,
  output logic                          eg_stitch,
  output logic                          eg_err,
  output logic [CELL_AW:0]              eg_free_cnt,
  output logic [N_PORTS-1:0][CELL_AW:0] eg_q_len,
  output logic                          egpm_rd_en,
  output logic [CELL_AW:0]              egpm_rd_addr,
  input  logic [PTR_W-1:0]              egpm_rd_data,
  output logic                          egpm_wr_en,
  output logic [CELL_AW:0]              egpm_wr_addr,
  output logic [PTR_W-1:0]              egpm_wr_data,
  output logic                          egbm_wr_en,
  output logic [CELL_AW+BW-1:0]         egbm_wr_addr,
  output logic [BEAT_W-1:0]             egbm_wr_data,
  output logic                          egbm_rd_en,
  output logic [CELL_AW+BW-1:0]         egbm_rd_addr,
  input  logic [BEAT_W-1:0]             egbm_rd_data
);
  ingress_bm #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .PTR_W(PTR_W),
               .BEAT_W(BEAT_W), .CELL_BEATS(CELL_BEATS),
               .SLOT_CYCLES(SLOT_CYCLES), .Q_LIMIT(Q_LIMIT),
               .RFC_DEPTH(RFC_DEPTH)) u_ingress (
    .clk, .rst_n,
    .init_done(ig_init_done), .soc(ig_soc), .slot_end(ig_slot_end),
    .in_valid(ig_in_valid), .in_data(ig_in_data),
    .out_valid(ig_out_valid), .out_sop(ig_out_sop), .out_port(ig_out_port),
    .out_data(ig_out_data),
    .arb_req(ig_arb_req), .arb_grant_valid(ig_arb_grant_valid),
    .arb_grant_port(ig_arb_grant_port),
    .drop(ig_drop), .st_valid(ig_stitch), .err(ig_err), .spurious(ig_spurious),
    .free_cnt(ig_free_cnt), .q_len(ig_q_len),
    .pm_rd_en(inpm_rd_en), .pm_rd_addr(inpm_rd_addr), .pm_rd_data(inpm_rd_data),
    .pm_wr_en(inpm_wr_en), .pm_wr_addr(inpm_wr_addr), .pm_wr_data(inpm_wr_data),
    .bm_wr_en(inbm_wr_en), .bm_wr_addr(inbm_wr_addr), .bm_wr_data(inbm_wr_data),
    .bm_rd_en(inbm_rd_en), .bm_rd_addr(inbm_rd_addr), .bm_rd_data(inbm_rd_data));

  logic [PW-1:0]  eg_phase;
  logic           eg_slot_end, eg_arr_valid;
  logic [PTW-1:0] eg_arr_port, eg_st_port;
  logic [31:0]    eg_drop_cnt;

  bm_engine #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .PTR_W(PTR_W),
              .BEAT_W(BEAT_W), .CELL_BEATS(CELL_BEATS),
              .SLOT_CYCLES(SLOT_CYCLES), .Q_LIMIT(Q_LIMIT)) u_egress (
    .clk, .rst_n, .init_done(eg_init_done), .phase(eg_phase), .soc(eg_soc),
    .slot_end(eg_slot_end),
    .in_valid(eg_in_valid), .in_data(eg_in_data),
    .sel_valid(eg_sel_valid), .sel_port(eg_sel_port),
    .out_valid(eg_out_valid), .out_sop(eg_out_sop), .out_port(eg_out_port),
    .out_data(eg_out_data),
    .arr_valid(eg_arr_valid), .arr_port(eg_arr_port),
    .st_valid(eg_stitch), .st_port(eg_st_port),
    .drop(eg_drop), .drop_cnt(eg_drop_cnt), .err(eg_err),
    .free_cnt(eg_free_cnt), .q_len(eg_q_len),
    .pm_rd_en(egpm_rd_en), .pm_rd_addr(egpm_rd_addr), .pm_rd_data(egpm_rd_data),
    .pm_wr_en(egpm_wr_en), .pm_wr_addr(egpm_wr_addr), .pm_wr_data(egpm_wr_data),
    .bm_wr_en(egbm_wr_en), .bm_wr_addr(egbm_wr_addr), .bm_wr_data(egbm_wr_data),
    .bm_rd_en(egbm_rd_en), .bm_rd_addr(egbm_rd_addr), .bm_rd_data(egbm_rd_data));
endmodule

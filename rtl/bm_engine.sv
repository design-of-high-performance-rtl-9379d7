// bm_engine: pipelined VOQ buffer engine (one buffer manager without its
// arbiter side).
//
// Cells are stored once in a cell buffer memory (INBM, 72-bit beats) and
// queued by address. The addresses of all N_PORTS virtual output queues and
// of the idle (free) queue are linked lists that share one dual-port pointer
// memory (INPM) of 36-bit words; each cell address owns two words, its next
// pointer (half 0) and its multicast leaf bitmap (half 1).
//
// Each cell slot of SLOT_CYCLES clocks admits at most one incoming cell and
// sends at most one outgoing cell. The blocks share the pointer memory and
// the queue registers by fixed phases of the slot (two clocks per stage):
//   0-1  WPM : pop idle queue, link the new cell to its VOQ, store its bitmap
//   2-3  RPM : stitch the previous multicast cell into its next leaf's VOQ
//   4-5  RPM : read the outgoing head cell's next pointer and bitmap
//   6-7  RPM : advance the VOQ head, free the address to the idle queue
//   8-9  synchronisation (request/grant bookkeeping at the slot end)
// Cell data move in parallel: the incoming cell writer (ICW) stores the cell
// received in the previous slot on phases 0-5, the outgoing cell reader (OCR)
// reads the granted cell on phases 1-6 and sends it on phases 2-7.
//
// Interface: a cell enters on `in_valid`/`in_data`, CELL_BEATS beats from
// phase 0 (`soc`) of a slot; its first beat carries the destination bitmap
// in its top N_PORTS bits. The queue to serve is given on `sel_valid`/
// `sel_port`, held through phase 0 of the slot it is served in. Both memories
// are external synchronous SRAMs with one clock of read latency. Arrivals and
// stitches are reported on `arr_*`/`st_*`. After reset the engine spends
// 2**CELL_AW clocks linking the idle queue (`init_done` low).
// The block set, the shared pointer memory, the two-slot read pointer work,
// the 36-bit pointer bus and two clocks per stage follow the design
// description; the phase assignment is this design's.
module bm_engine #(
  parameter int unsigned N_PORTS     = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW     = bm_pkg::CELL_AW,
  parameter int unsigned PTR_W       = bm_pkg::PTR_W,
  parameter int unsigned BEAT_W      = bm_pkg::BEAT_W,
  parameter int unsigned CELL_BEATS  = bm_pkg::CELL_BEATS,
  parameter int unsigned SLOT_CYCLES = bm_pkg::SLOT_CYCLES,
  parameter int unsigned Q_LIMIT     = bm_pkg::Q_LIMIT,
  localparam int unsigned PTW        = $clog2(N_PORTS),
  localparam int unsigned PW         = $clog2(SLOT_CYCLES),
  localparam int unsigned BW         = $clog2(CELL_BEATS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic                          init_done,
  output logic [PW-1:0]                 phase,
  output logic                          soc,
  output logic                          slot_end,
  // incoming cells
  input  logic                          in_valid,
  input  logic [BEAT_W-1:0]             in_data,
  // queue to serve
  input  logic                          sel_valid,
  input  logic [PTW-1:0]                sel_port,
  // outgoing cells
  output logic                          out_valid,
  output logic                          out_sop,
  output logic [PTW-1:0]                out_port,
  output logic [BEAT_W-1:0]             out_data,
  // queue events
  output logic                          arr_valid,
  output logic [PTW-1:0]                arr_port,
  output logic                          st_valid,
  output logic [PTW-1:0]                st_port,
  output logic                          drop,
  output logic [31:0]                   drop_cnt,
  output logic                          err,
  output logic [CELL_AW:0]              free_cnt,
  output logic [N_PORTS-1:0][CELL_AW:0] q_len,
  // pointer memory (INPM), address {cell, half}
  output logic                          pm_rd_en,
  output logic [CELL_AW:0]              pm_rd_addr,
  input  logic [PTR_W-1:0]              pm_rd_data,
  output logic                          pm_wr_en,
  output logic [CELL_AW:0]              pm_wr_addr,
  output logic [PTR_W-1:0]              pm_wr_data,
  // cell buffer memory (INBM), address {cell, beat}
  output logic                          bm_wr_en,
  output logic [CELL_AW+BW-1:0]         bm_wr_addr,
  output logic [BEAT_W-1:0]             bm_wr_data,
  output logic                          bm_rd_en,
  output logic [CELL_AW+BW-1:0]         bm_rd_addr,
  input  logic [BEAT_W-1:0]             bm_rd_data
);
  import bm_pkg::*;

  // slot schedule
  slot_timer #(.SLOT_CYCLES(SLOT_CYCLES)) u_timer (
    .clk, .rst_n, .phase, .soc, .slot_end);

  // ICW <-> PM/WPM
  logic               hdr_valid;
  logic [N_PORTS-1:0] hdr_bitmap;
  logic               accept;
  logic [PTW-1:0]     dest_port;
  logic [CELL_AW-1:0] wpm_cell;
  // IDQ
  logic               idq_pop, idq_avail, idq_push;
  logic [CELL_AW-1:0] idq_alloc, idq_push_addr;
  logic               idq_rd_en, idq_wr_en;
  logic [CELL_AW:0]   idq_rd_addr, idq_wr_addr;
  logic [PTR_W-1:0]   idq_wr_data;
  // WPM
  logic               wpm_enq;
  logic [PTW-1:0]     wpm_enq_port;
  logic [CELL_AW-1:0] wpm_enq_addr;
  logic               wpm_wr_en;
  logic [CELL_AW:0]   wpm_wr_addr;
  logic [PTR_W-1:0]   wpm_wr_data;
  // RPM
  logic               rpm_enq, rpm_deq, rpm_stitch;
  logic [PTW-1:0]     rpm_enq_port, rpm_deq_port, rpm_stitch_port, rpm_head_port;
  logic [CELL_AW-1:0] rpm_enq_addr, rpm_deq_next;
  logic               rpm_rd_en, rpm_wr_en;
  logic [CELL_AW:0]   rpm_rd_addr, rpm_wr_addr;
  logic [PTR_W-1:0]   rpm_wr_data;
  logic               rpm_cur_valid;
  logic [CELL_AW-1:0] rpm_cur_addr;
  logic [PTW-1:0]     rpm_cur_port;
  // VOQ
  logic               v_enq;
  logic [PTW-1:0]     v_enq_port;
  logic [CELL_AW-1:0] v_enq_addr, v_tail, v_head;
  logic               v_empty;
  logic [CELL_AW:0]   v_head_len;
  // OCR
  logic               ocr_gv;
  logic [PTW-1:0]     ocr_gp;
  logic               depart;
  logic [PTW-1:0]     depart_port;
  logic [N_PORTS-1:0][CELL_AW:0] pm_len;

  icw #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .BEAT_W(BEAT_W),
        .CELL_BEATS(CELL_BEATS), .SLOT_CYCLES(SLOT_CYCLES)) u_icw (
    .clk, .rst_n, .phase, .in_valid, .in_data,
    .hdr_valid, .hdr_bitmap, .accept, .wr_cell(wpm_cell),
    .bm_wr_en, .bm_wr_addr, .bm_wr_data);

  pm #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .Q_LIMIT(Q_LIMIT)) u_pm (
    .clk, .rst_n,
    .decide(phase == PW'(PH_WPM_LINK)), .hdr_valid, .hdr_bitmap,
    .idle_avail(idq_avail), .accept, .dest_port, .drop, .drop_cnt,
    .stitch(rpm_stitch), .stitch_port(rpm_stitch_port),
    .depart, .depart_port,
    .arr_valid, .arr_port, .st_valid, .st_port, .len(pm_len));

  idq #(.CELL_AW(CELL_AW), .PTR_W(PTR_W)) u_idq (
    .clk, .rst_n, .init_done,
    .pop(idq_pop), .alloc_addr(idq_alloc), .avail(idq_avail),
    .push(idq_push), .push_addr(idq_push_addr), .free_cnt,
    .pm_rd_en(idq_rd_en), .pm_rd_addr(idq_rd_addr), .pm_rd_data,
    .pm_wr_en(idq_wr_en), .pm_wr_addr(idq_wr_addr), .pm_wr_data(idq_wr_data));

  wpm #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .PTR_W(PTR_W)) u_wpm (
    .clk, .rst_n, .accept, .dest_port, .bitmap(hdr_bitmap),
    .bitmap_phase(phase == PW'(PH_WPM_BITMAP)),
    .idq_pop, .idq_addr(idq_alloc), .cell_addr(wpm_cell),
    .voq_enq(wpm_enq), .voq_port(wpm_enq_port), .voq_addr(wpm_enq_addr),
    .voq_tail(v_tail), .voq_empty(v_empty),
    .pm_wr_en(wpm_wr_en), .pm_wr_addr(wpm_wr_addr), .pm_wr_data(wpm_wr_data));

  rpm #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .PTR_W(PTR_W),
        .SLOT_CYCLES(SLOT_CYCLES)) u_rpm (
    .clk, .rst_n, .phase,
    .grant_valid(ocr_gv), .grant_port(ocr_gp),
    .cur_valid(rpm_cur_valid), .cur_addr(rpm_cur_addr), .cur_port(rpm_cur_port),
    .voq_head_port(rpm_head_port), .voq_head_addr(v_head), .voq_head_len(v_head_len),
    .voq_enq(rpm_enq), .voq_enq_port(rpm_enq_port), .voq_enq_addr(rpm_enq_addr),
    .voq_tail(v_tail), .voq_empty(v_empty),
    .voq_deq(rpm_deq), .voq_deq_port(rpm_deq_port), .voq_deq_next(rpm_deq_next),
    .pm_stitch(rpm_stitch), .pm_stitch_port(rpm_stitch_port),
    .idq_push, .idq_addr(idq_push_addr),
    .pm_rd_en(rpm_rd_en), .pm_rd_addr(rpm_rd_addr), .pm_rd_data,
    .pm_wr_en(rpm_wr_en), .pm_wr_addr(rpm_wr_addr), .pm_wr_data(rpm_wr_data),
    .err);

  // The WPM (phase 0) and the RPM stitch (phase 2) share the enqueue port.
  assign v_enq      = wpm_enq || rpm_enq;
  assign v_enq_port = wpm_enq ? wpm_enq_port : rpm_enq_port;
  assign v_enq_addr = wpm_enq ? wpm_enq_addr : rpm_enq_addr;

  voq #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW)) u_voq (
    .clk, .rst_n,
    .enq(v_enq), .enq_port(v_enq_port), .enq_addr(v_enq_addr),
    .enq_tail(v_tail), .enq_empty(v_empty),
    .deq(rpm_deq), .deq_port(rpm_deq_port), .deq_next(rpm_deq_next),
    .head_port(rpm_head_port), .head_addr(v_head), .head_len(v_head_len),
    .q_len);

  ocr #(.N_PORTS(N_PORTS), .CELL_AW(CELL_AW), .BEAT_W(BEAT_W),
        .CELL_BEATS(CELL_BEATS), .SLOT_CYCLES(SLOT_CYCLES)) u_ocr (
    .clk, .rst_n, .phase, .sel_valid(sel_valid && init_done), .sel_port,
    .rpm_grant_valid(ocr_gv), .rpm_grant_port(ocr_gp),
    .rpm_valid(rpm_cur_valid), .rpm_addr(rpm_cur_addr), .rpm_port(rpm_cur_port),
    .depart, .depart_port,
    .bm_rd_en, .bm_rd_addr, .bm_rd_data,
    .out_valid, .out_sop, .out_port, .out_data);

  // Pointer memory ports: the phase plan gives each user its own clocks.
  always_comb begin
    pm_rd_en   = idq_rd_en || rpm_rd_en;
    pm_rd_addr = idq_rd_en ? idq_rd_addr : rpm_rd_addr;
    pm_wr_en   = idq_wr_en || wpm_wr_en || rpm_wr_en;
    pm_wr_addr = idq_wr_en ? idq_wr_addr : (wpm_wr_en ? wpm_wr_addr : rpm_wr_addr);
    pm_wr_data = idq_wr_en ? idq_wr_data : (wpm_wr_en ? wpm_wr_data : rpm_wr_data);
  end

  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(idq_rd_en && rpm_rd_en));
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
                                 $countones({idq_wr_en, wpm_wr_en, rpm_wr_en}) <= 1);
  a_one_enq: assert property (@(posedge clk) disable iff (!rst_n)
                              !(wpm_enq && rpm_enq));
endmodule

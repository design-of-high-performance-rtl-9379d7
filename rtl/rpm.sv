// rpm: read pointer manager.
//
// Each slot the RPM removes the head cell of the queue chosen by the central
// arbiter, and either frees the cell's address or, for a multicast cell that
// still has leaves to serve, queues the same address for the next leaf.
// Its work for one outgoing cell spans two slots and overlaps with the
// previous cell's second half:
//   slot n, phase 0 : take the granted port g from the outgoing cell reader
//                     and the head address H of queue g (steps a-c); H goes
//                     to the reader (step d).
//   phase 4, 5      : read H's pointer entry, next field then bitmap (step e).
//   phase 6         : make `next` the new head of queue g (step f); clear
//                     bit g of the bitmap.
//   phase 7         : if no leaf is left, put H on the idle queue (step f).
//   slot n+1, phase 2: if leaves are left, pass the next leaf q (lowest set
//                     bit) to the policing module (step g), append H to
//                     queue q: the old tail's next field gets H (steps h-j).
//   phase 3         : write the reduced bitmap back into H's entry (step k).
// The stitching of cell n-1 therefore happens in the same slot as the read of
// cell n, before it, so a read of a queue just stitched into sees the new
// link. A grant for an empty queue is ignored and flagged on `err`.
// Pointer memory reads return data one clock after the request.
// The steps and their split over two slots follow the design description;
// the phase numbers and the lowest-leaf-next order are this design's.
module rpm #(
  parameter int unsigned N_PORTS     = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW     = bm_pkg::CELL_AW,
  parameter int unsigned PTR_W       = bm_pkg::PTR_W,
  parameter int unsigned SLOT_CYCLES = bm_pkg::SLOT_CYCLES,
  localparam int unsigned PTW        = $clog2(N_PORTS),
  localparam int unsigned PW         = $clog2(SLOT_CYCLES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PW-1:0]      phase,
  // from the outgoing cell reader, phase 0
  input  logic               grant_valid,
  input  logic [PTW-1:0]     grant_port,
  // to the outgoing cell reader, phases 1 .. SLOT_CYCLES-1
  output logic               cur_valid,
  output logic [CELL_AW-1:0] cur_addr,
  output logic [PTW-1:0]     cur_port,
  // VOQ registers
  output logic [PTW-1:0]     voq_head_port,
  input  logic [CELL_AW-1:0] voq_head_addr,
  input  logic [CELL_AW:0]   voq_head_len,
  output logic               voq_enq,
  output logic [PTW-1:0]     voq_enq_port,
  output logic [CELL_AW-1:0] voq_enq_addr,
  input  logic [CELL_AW-1:0] voq_tail,
  input  logic               voq_empty,
  output logic               voq_deq,
  output logic [PTW-1:0]     voq_deq_port,
  output logic [CELL_AW-1:0] voq_deq_next,
  // policing module: next leaf
  output logic               pm_stitch,
  output logic [PTW-1:0]     pm_stitch_port,
  // idle queue
  output logic               idq_push,
  output logic [CELL_AW-1:0] idq_addr,
  // pointer memory
  output logic               pm_rd_en,
  output logic [CELL_AW:0]   pm_rd_addr,
  input  logic [PTR_W-1:0]   pm_rd_data,
  output logic               pm_wr_en,
  output logic [CELL_AW:0]   pm_wr_addr,
  output logic [PTR_W-1:0]   pm_wr_data,
  output logic               err
);
  import bm_pkg::*;

  logic               act;
  logic [PTW-1:0]     g;
  logic [CELL_AW-1:0] h;
  logic [CELL_AW-1:0] nxt;
  logic               free_pend;
  logic               mc_pend;
  logic [CELL_AW-1:0] mc_addr;
  logic [PTW-1:0]     mc_port;
  logic [N_PORTS-1:0] mc_bm;
  logic [N_PORTS-1:0] rest;
  logic [PTW-1:0]     rest_first;

  wire ph0 = (phase == PW'(0));
  wire ph_st = (phase == PW'(PH_STITCH));
  wire ph_up = (phase == PW'(PH_MC_UPDATE));
  wire ph_rn = (phase == PW'(PH_RD_NEXT));
  wire ph_rb = (phase == PW'(PH_RD_BITMAP));
  wire ph_dq = (phase == PW'(PH_DEQ));
  wire ph_fr = (phase == PW'(PH_FREE));

  // Leaves still to serve after this one, and the lowest of them.
  assign rest = pm_rd_data[N_PORTS-1:0] & ~(N_PORTS'(1) << g);
  always_comb begin
    rest_first = '0;
    for (int i = N_PORTS - 1; i >= 0; i--)
      if (rest[i]) rest_first = PTW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act       <= 1'b0;
      g         <= '0;
      h         <= '0;
      nxt       <= '0;
      free_pend <= 1'b0;
      mc_pend   <= 1'b0;
      mc_addr   <= '0;
      mc_port   <= '0;
      mc_bm     <= '0;
    end else begin
      if (ph0) begin
        act <= grant_valid && (voq_head_len != '0);
        g   <= grant_port;
        h   <= voq_head_addr;
      end
      if (ph_up) mc_pend <= 1'b0;
      if (ph_rb) nxt <= pm_rd_data[CELL_AW-1:0];
      if (ph_dq && act) begin
        if (rest == '0) begin
          free_pend <= 1'b1;
        end else begin
          mc_pend <= 1'b1;
          mc_addr <= h;
          mc_port <= rest_first;
          mc_bm   <= rest;
        end
      end
      if (ph_fr) free_pend <= 1'b0;
    end
  end

  assign err       = ph0 && grant_valid && (voq_head_len == '0);
  assign cur_valid = act;
  assign cur_addr  = h;
  assign cur_port  = g;

  assign voq_head_port = grant_port;
  assign voq_enq       = ph_st && mc_pend;
  assign voq_enq_port  = mc_port;
  assign voq_enq_addr  = mc_addr;
  assign voq_deq       = ph_dq && act;
  assign voq_deq_port  = g;
  assign voq_deq_next  = nxt;
  assign pm_stitch      = ph_st && mc_pend;
  assign pm_stitch_port = mc_port;
  assign idq_push = ph_fr && free_pend;
  assign idq_addr = h;

  always_comb begin
    pm_rd_en   = act && (ph_rn || ph_rb);
    pm_rd_addr = {h, ph_rb ? HALF_BITMAP : HALF_NEXT};
    pm_wr_en   = 1'b0;
    pm_wr_addr = {voq_tail, HALF_NEXT};
    pm_wr_data = PTR_W'(mc_addr);
    if (ph_st && mc_pend) begin
      pm_wr_en = !voq_empty;
    end else if (ph_up && mc_pend) begin
      pm_wr_en   = 1'b1;
      pm_wr_addr = {mc_addr, HALF_BITMAP};
      pm_wr_data = PTR_W'(mc_bm);
    end
  end
endmodule

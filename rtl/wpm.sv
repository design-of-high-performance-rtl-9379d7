// wpm: write pointer manager.
//
// When the policing module admits the cell held by the incoming cell writer
// (`accept`, phase 0 of the slot), this block takes the head of the idle
// queue as the cell's buffer address, hands that address to the writer and
// appends it to the destination queue:
//   phase 0 - pop the idle queue; enqueue the address in the VOQ; if the
//             queue was not empty, write the address into the old tail's
//             next field (pointer word half 0);
//   phase 1 - write the cell's destination bitmap into its own pointer entry
//             (half 1), for the multicast stitching done on the way out.
// Outputs are combinational requests on the phase clocks; the bitmap and
// address are held in registers between the two clocks.
// The role of the block follows the design description; the split of the
// 72-bit pointer entry into a next half and a bitmap half is this design's.
module wpm #(
  parameter int unsigned N_PORTS = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW = bm_pkg::CELL_AW,
  parameter int unsigned PTR_W   = bm_pkg::PTR_W,
  localparam int unsigned PTW    = $clog2(N_PORTS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               accept,        // phase 0
  input  logic [PTW-1:0]     dest_port,
  input  logic [N_PORTS-1:0] bitmap,
  input  logic               bitmap_phase,  // phase 1
  // idle queue
  output logic               idq_pop,
  input  logic [CELL_AW-1:0] idq_addr,
  // cell writer
  output logic [CELL_AW-1:0] cell_addr,
  // VOQ registers
  output logic               voq_enq,
  output logic [PTW-1:0]     voq_port,
  output logic [CELL_AW-1:0] voq_addr,
  input  logic [CELL_AW-1:0] voq_tail,
  input  logic               voq_empty,
  // pointer memory write
  output logic               pm_wr_en,
  output logic [CELL_AW:0]   pm_wr_addr,
  output logic [PTR_W-1:0]   pm_wr_data
);
  logic               pend;
  logic [CELL_AW-1:0] a_reg;
  logic [N_PORTS-1:0] bm_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend   <= 1'b0;
      a_reg  <= '0;
      bm_reg <= '0;
    end else begin
      if (accept) begin
        pend   <= 1'b1;
        a_reg  <= idq_addr;
        bm_reg <= bitmap;
      end else if (bitmap_phase) begin
        pend <= 1'b0;
      end
    end
  end

  assign idq_pop   = accept;
  assign cell_addr = idq_addr;
  assign voq_enq   = accept;
  assign voq_port  = dest_port;
  assign voq_addr  = idq_addr;

  always_comb begin
    pm_wr_en   = 1'b0;
    pm_wr_addr = {voq_tail, bm_pkg::HALF_NEXT};
    pm_wr_data = PTR_W'(idq_addr);
    if (accept) begin
      pm_wr_en = !voq_empty;
    end else if (bitmap_phase && pend) begin
      pm_wr_en   = 1'b1;
      pm_wr_addr = {a_reg, bm_pkg::HALF_BITMAP};
      pm_wr_data = PTR_W'(bm_reg);
    end
  end
endmodule

// pm: policing module.
//
// Keeps the length of every virtual output queue as seen by the cell flow and
// decides, at phase 0 of each slot, whether the cell held by the incoming
// cell writer is admitted. A cell is admitted when its destination bitmap is
// not empty, a free buffer address exists and the queue of its first leaf
// (the lowest-numbered destination) holds fewer than Q_LIMIT cells;
// otherwise it is dropped and counted. A multicast cell is queued for its
// first leaf only: each further leaf is added later by the read pointer
// manager ("stitching"), and each stitch also adds one to that leaf's length.
// A cell leaving (from the outgoing cell reader) subtracts one.
// Arrivals and stitches are passed on (`arr_*`, `st_*`) to the backpressure
// controller. All updates take effect at the next rising edge; several on
// one clock are summed.
// The admission rule and Q_LIMIT are this design's choices; the design description
// names the block and says it counts queued cells, arrivals and stitches.
module pm #(
  parameter int unsigned N_PORTS = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW = bm_pkg::CELL_AW,
  parameter int unsigned Q_LIMIT = bm_pkg::Q_LIMIT,
  localparam int unsigned PTW    = $clog2(N_PORTS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // admission, on the decision clock
  input  logic                          decide,
  input  logic                          hdr_valid,
  input  logic [N_PORTS-1:0]            hdr_bitmap,
  input  logic                          idle_avail,
  output logic                          accept,
  output logic [PTW-1:0]                dest_port,
  output logic                          drop,
  output logic [31:0]                   drop_cnt,
  // leaf added by multicast stitching
  input  logic                          stitch,
  input  logic [PTW-1:0]                stitch_port,
  // cell sent
  input  logic                          depart,
  input  logic [PTW-1:0]                depart_port,
  // events for the backpressure controller
  output logic                          arr_valid,
  output logic [PTW-1:0]                arr_port,
  output logic                          st_valid,
  output logic [PTW-1:0]                st_port,
  output logic [N_PORTS-1:0][CELL_AW:0] len
);
  always_comb begin
    dest_port = '0;
    for (int i = N_PORTS - 1; i >= 0; i--)
      if (hdr_bitmap[i]) dest_port = PTW'(i);
  end

  assign accept = decide && hdr_valid && (hdr_bitmap != '0) && idle_avail &&
                  (len[dest_port] < (CELL_AW+1)'(Q_LIMIT));
  assign drop      = decide && hdr_valid && !accept;
  assign arr_valid = accept;
  assign arr_port  = dest_port;
  assign st_valid  = stitch;
  assign st_port   = stitch_port;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len      <= '0;
      drop_cnt <= '0;
    end else begin
      for (int p = 0; p < N_PORTS; p++)
        len[p] <= len[p] + (CELL_AW+1)'(accept && dest_port == PTW'(p))
                         + (CELL_AW+1)'(stitch && stitch_port == PTW'(p))
                         - (CELL_AW+1)'(depart && depart_port == PTW'(p));
      if (drop) drop_cnt <= drop_cnt + 1;
    end
  end
endmodule

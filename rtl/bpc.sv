// bpc: backpressure controller.
//
// Gathers, over one cell slot, the queue events reported by the policing
// module - a cell admitted to a VOQ (`arr_*`) and a multicast cell stitched
// into the queue of its next leaf (`st_*`) - into one count per VOQ, and
// hands the counts to the request FIFO controller at the end of the slot.
// `inc` holds the counts of the slot so far; it is read by the RFC on the
// `slot_end` clock and starts again from the events of the next clock.
// At most two events per VOQ fall in one slot (one arrival, one stitch), so
// two bits per VOQ suffice.
// The block's place between PM and RFC follows the design description; the
// per-slot aggregation is this design's. Flow control towards the port
// processor, which the block's name suggests, is not described and not built.
module bpc #(
  parameter int unsigned N_PORTS = bm_pkg::N_PORTS,
  localparam int unsigned PTW    = $clog2(N_PORTS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    slot_end,
  input  logic                    arr_valid,
  input  logic [PTW-1:0]          arr_port,
  input  logic                    st_valid,
  input  logic [PTW-1:0]          st_port,
  output logic [N_PORTS-1:0][1:0] inc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc <= '0;
    end else begin
      for (int p = 0; p < N_PORTS; p++)
        inc[p] <= (slot_end ? 2'd0 : inc[p])
                  + 2'(arr_valid && arr_port == PTW'(p))
                  + 2'(st_valid && st_port == PTW'(p));
    end
  end

  a_no_events_at_end: assert property (@(posedge clk) disable iff (!rst_n)
                                       slot_end |-> !(arr_valid || st_valid));
endmodule

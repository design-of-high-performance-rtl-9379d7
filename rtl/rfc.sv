// rfc: request FIFO controller.
//
// Talks to the central arbiter across a link whose round trip takes up to
// DEPTH cell slots. Each VOQ has a DEPTH-bit request shift register: bit 0 is
// the request sent this slot, bit DEPTH-1 the one sent DEPTH-1 slots ago,
// each bit marking a request still waiting for its grant. The block also
// keeps its own count of cells per VOQ that have no request yet (the
// policing module's count less the requests in flight).
//
// Once per slot, on `slot_end`:
//  1. The new arrivals and stitches reported by the backpressure controller
//     (`inc`) are added to the counts.
//  2. A grant (`arb_grant_valid`, `arb_grant_port`) deletes the oldest
//     request of that port's register and is passed on, for the next slot,
//     to the outgoing cell reader (`ocr_grant_*`). A grant with no request
//     behind it is dropped and flagged on `spurious`.
//  3. Every register shifts by one. What enters bit 0, and goes to the
//     arbiter in `arb_req` for the next slot, is
//       - the request leaving the last bit again, if it was never granted;
//       - otherwise a new request, if the count is above zero (count - 1);
//       - otherwise an empty (invalid) request.
// This way a VOQ never has more than DEPTH requests outstanding, the arbiter
// sees at most one request per VOQ per slot, and a request the arbiter turned
// down is sent again once its round trip has passed.
// The shift register per VOQ, new requests only when the first element is
// free, invalid requests when the count is zero, and grants deleting the
// oldest request follow the design description. Reading the "first element"
// as the element leaving the register, the re-sending of an ungranted
// request, DEPTH and the once-per-slot timing are this design's choices.
module rfc #(
  parameter int unsigned N_PORTS = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW = bm_pkg::CELL_AW,
  parameter int unsigned DEPTH   = bm_pkg::RFC_DEPTH,
  localparam int unsigned PTW    = $clog2(N_PORTS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          slot_end,
  input  logic [N_PORTS-1:0][1:0]       inc,
  input  logic                          arb_grant_valid,
  input  logic [PTW-1:0]                arb_grant_port,
  output logic [N_PORTS-1:0]            arb_req,
  output logic                          ocr_grant_valid,
  output logic [PTW-1:0]                ocr_grant_port,
  output logic                          spurious,
  output logic [N_PORTS-1:0][CELL_AW:0] len,
  output logic [N_PORTS-1:0][DEPTH-1:0] fifo
);
  logic [N_PORTS-1:0][DEPTH-1:0] fifo_g;
  logic                          hit;
  logic                          done;
  logic [N_PORTS-1:0][CELL_AW:0] len_n;
  logic [N_PORTS-1:0][DEPTH-1:0] fifo_n;
  logic [N_PORTS-1:0]            req_n;

  // Grant: clear the oldest (highest) valid bit of the granted register.
  always_comb begin
    fifo_g = fifo;
    hit    = 1'b0;
    done   = 1'b0;
    if (arb_grant_valid) begin
      for (int b = 0; b < DEPTH; b++)
        if (fifo[arb_grant_port][b]) hit = 1'b1;
      done = 1'b0;
      for (int b = DEPTH - 1; b >= 0; b--)
        if (fifo[arb_grant_port][b] && !done) begin
          fifo_g[arb_grant_port][b] = 1'b0;
          done = 1'b1;
        end
    end
  end

  // Shift and request generation.
  always_comb begin
    for (int v = 0; v < N_PORTS; v++) begin
      len_n[v] = len[v] + (CELL_AW+1)'(inc[v]);
      if (fifo_g[v][DEPTH-1]) begin
        req_n[v] = 1'b1;
      end else if (len_n[v] != '0) begin
        req_n[v] = 1'b1;
        len_n[v] = len_n[v] - 1'b1;
      end else begin
        req_n[v] = 1'b0;
      end
      fifo_n[v] = {fifo_g[v][DEPTH-2:0], req_n[v]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo            <= '0;
      len             <= '0;
      arb_req         <= '0;
      ocr_grant_valid <= 1'b0;
      ocr_grant_port  <= '0;
    end else if (slot_end) begin
      fifo            <= fifo_n;
      len             <= len_n;
      arb_req         <= req_n;
      ocr_grant_valid <= arb_grant_valid && hit;
      ocr_grant_port  <= arb_grant_port;
    end
  end

  assign spurious = slot_end && arb_grant_valid && !hit;
endmodule

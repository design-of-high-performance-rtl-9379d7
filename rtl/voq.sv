// voq: head and tail registers of the virtual output queues.
//
// Each of the N_PORTS queues is a linked list of cell addresses in the shared
// pointer memory. This block holds, per queue, the output head register
// (OHR), the output tail register (OTR) and the queue length; the links
// themselves are written into the pointer memory by the WPM and RPM.
//
// enq : append `enq_addr` to queue `enq_port`. `enq_tail`/`enq_empty` show,
//       on the same clock, the current tail of that queue and whether it is
//       empty, so the caller can write the link tail.next = enq_addr.
// deq : remove the head of `deq_port`; `deq_next` (read from the head's
//       pointer entry) becomes the new head.
// head: `head_addr`/`head_len` of queue `head_port`, combinational.
// enq and deq must not fall on the same clock (the slot schedule keeps them at
// different phases). Registers update on the rising edge.
// The head/tail register pairs follow the design description; the length
// counters are this design's choice for telling an empty queue.
module voq #(
  parameter int unsigned N_PORTS = bm_pkg::N_PORTS,
  parameter int unsigned CELL_AW = bm_pkg::CELL_AW
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              enq,
  input  logic [$clog2(N_PORTS)-1:0]        enq_port,
  input  logic [CELL_AW-1:0]                enq_addr,
  output logic [CELL_AW-1:0]                enq_tail,
  output logic                              enq_empty,
  input  logic                              deq,
  input  logic [$clog2(N_PORTS)-1:0]        deq_port,
  input  logic [CELL_AW-1:0]                deq_next,
  input  logic [$clog2(N_PORTS)-1:0]        head_port,
  output logic [CELL_AW-1:0]                head_addr,
  output logic [CELL_AW:0]                  head_len,
  output logic [N_PORTS-1:0][CELL_AW:0]     q_len
);
  logic [N_PORTS-1:0][CELL_AW-1:0] ohr, otr;

  assign enq_tail  = otr[enq_port];
  assign enq_empty = (q_len[enq_port] == '0);
  assign head_addr = ohr[head_port];
  assign head_len  = q_len[head_port];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ohr   <= '0;
      otr   <= '0;
      q_len <= '0;
    end else begin
      if (enq) begin
        otr[enq_port]   <= enq_addr;
        if (q_len[enq_port] == '0) ohr[enq_port] <= enq_addr;
        q_len[enq_port] <= q_len[enq_port] + 1'b1;
      end
      if (deq) begin
        ohr[deq_port]   <= deq_next;
        q_len[deq_port] <= q_len[deq_port] - 1'b1;
      end
    end
  end

  a_enq_deq_apart: assert property (@(posedge clk) disable iff (!rst_n) !(enq && deq));
  a_deq_nonempty:  assert property (@(posedge clk) disable iff (!rst_n)
                                    deq |-> q_len[deq_port] != '0);
endmodule

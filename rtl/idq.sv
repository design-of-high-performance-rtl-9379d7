// idq: idle queue of free cell buffer addresses.
//
// Free cell addresses form one linked list in the same pointer memory as the
// virtual output queues; the idle head register (IHR) and idle tail register
// (ITR) point at its ends and a counter holds its length. After reset the
// block links every address to the next one (address i gets next = i+1), one
// pointer-memory write per clock, then raises `init_done` with all
// 2**CELL_AW addresses free.
//
// pop : take the address in IHR (`alloc_addr`, valid while `avail`). The
//       block reads IHR's next field (36-bit word, half 0) and loads it into
//       IHR on the following clock.
// push: append `push_addr` at the tail: write it into ITR's next field and
//       make it the new ITR (or the new head and tail if the list is empty).
// The pointer memory is synchronous with one clock of read latency. pop and
// push must not fall on the same clock, and push must not fall on the clock
// after a pop; the slot schedule keeps them at phases 0 and 7.
// The linked idle list sharing the pointer memory follows the design
// description; the counter and the linking of memory at start-up are this
// design's choices.
module idq #(
  parameter int unsigned CELL_AW = bm_pkg::CELL_AW,
  parameter int unsigned PTR_W   = bm_pkg::PTR_W
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               init_done,
  // allocation
  input  logic               pop,
  output logic [CELL_AW-1:0] alloc_addr,
  output logic               avail,
  // release
  input  logic               push,
  input  logic [CELL_AW-1:0] push_addr,
  output logic [CELL_AW:0]   free_cnt,
  // pointer memory access (address = {cell address, half})
  output logic               pm_rd_en,
  output logic [CELL_AW:0]   pm_rd_addr,
  input  logic [PTR_W-1:0]   pm_rd_data,
  output logic               pm_wr_en,
  output logic [CELL_AW:0]   pm_wr_addr,
  output logic [PTR_W-1:0]   pm_wr_data
);
  logic [CELL_AW-1:0] ihr, itr;     // idle head / idle tail registers
  logic [CELL_AW-1:0] init_idx;
  logic               pop_d;

  assign alloc_addr = ihr;
  assign avail      = init_done && (free_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_idx  <= '0;
      ihr       <= '0;
      itr       <= '0;
      free_cnt  <= '0;
      pop_d     <= 1'b0;
    end else if (!init_done) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == '1) begin
        init_done <= 1'b1;
        ihr       <= '0;
        itr       <= '1;
        free_cnt  <= (CELL_AW+1)'(1) << CELL_AW;
      end
    end else begin
      pop_d <= pop && avail;
      if (pop_d) ihr <= pm_rd_data[CELL_AW-1:0];
      if (push) begin
        itr <= push_addr;
        if (free_cnt == '0) ihr <= push_addr;
      end
      free_cnt <= free_cnt + (CELL_AW+1)'(push) - (CELL_AW+1)'(pop && avail);
    end
  end

  always_comb begin
    pm_rd_en   = init_done && pop && avail;
    pm_rd_addr = {ihr, bm_pkg::HALF_NEXT};
    pm_wr_en   = 1'b0;
    pm_wr_addr = {itr, bm_pkg::HALF_NEXT};
    pm_wr_data = '0;
    if (!init_done) begin
      pm_wr_en   = 1'b1;
      pm_wr_addr = {init_idx, bm_pkg::HALF_NEXT};
      pm_wr_data = PTR_W'(init_idx + 1'b1);
    end else if (push && free_cnt != '0) begin
      pm_wr_en   = 1'b1;
      pm_wr_data = PTR_W'(push_addr);
    end
  end

  // Schedule rules of the slot plan.
  a_no_pop_push: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(pop && push));
  a_no_push_after_pop: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(pop_d && push));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && free_cnt == ((CELL_AW+1)'(1) << CELL_AW)));
endmodule

// idq_tb: checks the idle queue against a FIFO model of free addresses.
// A 16-cell queue is built at reset (all addresses linked in order), then
// random pops and pushes follow the slot schedule (a pop, one idle clock,
// then a push). Each allocated address must be the model's oldest free one;
// the free count and `avail` are compared, and the list is run empty and
// refilled.
module idq_tb;
  localparam int AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done, pop, avail, push;
  logic [AW-1:0] alloc_addr, push_addr;
  logic [AW:0] free_cnt;
  logic pm_rd_en, pm_wr_en;
  logic [AW:0] pm_rd_addr, pm_wr_addr;
  logic [35:0] pm_rd_data, pm_wr_data;

  idq #(.CELL_AW(AW)) dut (.*);
  sram_model #(.AW(AW+1), .DW(36)) u_mem (
    .clk, .wr_en(pm_wr_en), .wr_addr(pm_wr_addr), .wr_data(pm_wr_data),
    .rd_en(pm_rd_en), .rd_addr(pm_rd_addr), .rd_data(pm_rd_data));

  int checks = 0, failures = 0;
  int fl[$];
  int held[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_empty = 0, n_pop = 0, n_push = 0, cyc = 0;
    pop = 0; push = 0; push_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!init_done) begin @(negedge clk); cyc++; end
    check(cyc == (1 << AW), "initialisation takes one clock per cell");
    for (int i = 0; i < (1 << AW); i++) fl.push_back(i);
    for (int i = 0; i < 2000; i++) begin
      int bias;
      bias = (((i / 200) % 2) != 0) ? 30 : 70;   // alternate draining and filling
      @(negedge clk);
      check(free_cnt == fl.size(), "free count");
      check(avail == (fl.size() > 0), "avail");
      if (fl.size() == 0) n_empty++;
      if (fl.size() > 0) check(alloc_addr == AW'(fl[0]), "allocated address is the oldest free one");
      pop = (fl.size() > 0) && ($urandom_range(0, 99) < bias);
      if (pop) begin held.push_back(fl.pop_front()); n_pop++; end
      @(negedge clk);
      pop = 0;
      @(negedge clk);
      push = (held.size() > 0) && ($urandom_range(0, 99) >= bias);
      if (push) begin
        int k;
        k = $urandom_range(0, held.size() - 1);
        push_addr = AW'(held[k]);
        fl.push_back(held[k]);
        held.delete(k);
        n_push++;
      end
      @(negedge clk);
      push = 0;
    end
    check(n_empty > 0 && n_pop > 0 && n_push > 0, "empty list reached, pops and pushes done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

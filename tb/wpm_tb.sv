// wpm_tb: checks the write pointer manager's requests for each admitted
// cell: on the admission clock an idle-queue pop, the idle head as the cell
// address, an enqueue to the destination VOQ and, when that queue is not
// empty, the link write tail.next = address (word half 0); on the next
// clock the bitmap write into the cell's own entry (half 1). Nothing is
// requested for slots without an admitted cell.
module wpm_tb;
  localparam int NP = 16, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic accept, bitmap_phase, idq_pop, voq_enq, voq_empty, pm_wr_en;
  logic [3:0] dest_port, voq_port;
  logic [NP-1:0] bitmap;
  logic [AW-1:0] idq_addr, cell_addr, voq_addr, voq_tail;
  logic [AW:0] pm_wr_addr;
  logic [35:0] pm_wr_data;

  wpm #(.N_PORTS(NP), .CELL_AW(AW)) dut (.*);

  int checks = 0, failures = 0;

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
    int n_link = 0, n_first = 0;
    bit acc;
    logic [AW-1:0] a;
    logic [NP-1:0] bm;
    accept = 0; bitmap_phase = 0; dest_port = 0; bitmap = 0; idq_addr = 0;
    voq_tail = 0; voq_empty = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 500; s++) begin
      acc = $urandom_range(0, 3) != 0;
      a = AW'($urandom); bm = NP'($urandom);
      // phase 0
      @(negedge clk);
      accept = acc; bitmap_phase = 0;
      dest_port = 4'($urandom); bitmap = bm; idq_addr = a;
      voq_tail = AW'($urandom); voq_empty = $urandom_range(0, 2) == 0;
      #1;
      check(idq_pop == acc && voq_enq == acc, "pop and enqueue on admission");
      if (acc) begin
        check(cell_addr == a && voq_addr == a && voq_port == dest_port, "cell address and port");
        check(pm_wr_en == !voq_empty, "link write only to a non-empty queue");
        if (!voq_empty) begin
          check(pm_wr_addr == {voq_tail, 1'b0} && pm_wr_data == 36'(a), "link tail.next");
          n_link++;
        end else n_first++;
      end else check(!pm_wr_en, "no write without a cell");
      // phase 1
      @(negedge clk);
      accept = 0; bitmap_phase = 1;
      idq_addr = AW'($urandom); bitmap = NP'($urandom);
      #1;
      check(!idq_pop && !voq_enq, "nothing else on phase 1");
      check(pm_wr_en == acc, "bitmap write");
      if (acc) check(pm_wr_addr == {a, 1'b1} && pm_wr_data == 36'(bm), "bitmap entry");
      // rest of the slot
      repeat (3) begin
        @(negedge clk);
        bitmap_phase = 0;
        #1;
        check(!pm_wr_en && !idq_pop && !voq_enq, "idle");
      end
    end
    check(n_link > 0 && n_first > 0, "both link cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

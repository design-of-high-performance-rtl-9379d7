// voq_tb: checks the VOQ head/tail registers against a queue model.
// Random enqueues and dequeues (never on the same clock) on 4 queues; the
// bench supplies the "next" address of a dequeued head from its own model of
// the linked lists. Head address, length, tail and empty flags are compared
// every clock.
module voq_tb;
  localparam int NP = 4, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enq, deq;
  logic [1:0] enq_port, deq_port, head_port;
  logic [AW-1:0] enq_addr, enq_tail, deq_next, head_addr;
  logic enq_empty;
  logic [AW:0] head_len;
  logic [NP-1:0][AW:0] q_len;

  voq #(.N_PORTS(NP), .CELL_AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  int q[NP][$];
  int next_addr = 0;

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
    int n_first = 0, n_link = 0, n_deq = 0;
    enq = 0; deq = 0; enq_port = 0; deq_port = 0; head_port = 0; enq_addr = 0; deq_next = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) check(q_len[p] == q[p].size(), "length");
      head_port = 2'($urandom_range(0, NP - 1));
      #1;
      if (q[head_port].size() > 0) check(head_addr == AW'(q[head_port][0]), "head address");
      check(head_len == q[head_port].size(), "head length");
      enq = 0; deq = 0;
      if ($urandom_range(0, 1)) begin
        enq_port = 2'($urandom_range(0, NP - 1));
        enq_addr = AW'(next_addr);
        enq = (q[enq_port].size() < 30);
        #1;
        check(enq_empty == (q[enq_port].size() == 0), "empty flag");
        if (q[enq_port].size() > 0) check(enq_tail == AW'(q[enq_port][$]), "tail address");
        if (enq) begin
          if (q[enq_port].size() == 0) n_first++; else n_link++;
          q[enq_port].push_back(next_addr);
          next_addr = (next_addr + 1) % (1 << AW);
        end
      end else begin
        deq_port = 2'($urandom_range(0, NP - 1));
        if (q[deq_port].size() > 0) begin
          void'(q[deq_port].pop_front());
          deq_next = (q[deq_port].size() > 0) ? AW'(q[deq_port][0]) : AW'($urandom);
          deq = 1;
          n_deq++;
        end
      end
    end
    @(negedge clk); enq = 0; deq = 0;
    check(n_first > 0 && n_link > 0 && n_deq > 0, "all paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

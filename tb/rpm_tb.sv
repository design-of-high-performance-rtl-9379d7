// rpm_tb: checks the read pointer manager with a real VOQ register block and
// a pointer-memory model. The bench builds the linked queues itself on
// phases 8-9 of each slot (enqueue, tail link, bitmap entry), then grants a
// queue on phase 0, usually a non-empty one. A slot-level queue model
// predicts the head address handed to the reader (phase 1), the freed
// address (phase 7) or the next leaf that the multicast cell is stitched into
// in the following slot (phase 2), the bitmap written back (phase 3), and the
// queue lengths and heads. A grant on an empty queue must raise `err`.
module rpm_tb;
  import bm_ref_pkg::*;
  localparam int NP = 16, AW = 6, SLOT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase;
  logic grant_valid, cur_valid, voq_enq, voq_empty, voq_deq, pm_stitch, idq_push;
  logic pm_rd_en, pm_wr_en, err;
  logic [3:0] grant_port, cur_port, voq_head_port, voq_enq_port, voq_deq_port, pm_stitch_port;
  logic [AW-1:0] cur_addr, voq_head_addr, voq_enq_addr, voq_tail, voq_deq_next, idq_addr;
  logic [AW:0] voq_head_len, pm_rd_addr, pm_wr_addr;
  logic [35:0] pm_rd_data, pm_wr_data;
  logic [NP-1:0][AW:0] q_len;

  // bench-side enqueue and memory writes, muxed with the RPM's
  logic tb_enq, tb_wr;
  logic [3:0] tb_port;
  logic [AW-1:0] tb_addr;
  logic [AW:0] tb_wr_addr;
  logic [35:0] tb_wr_data;

  rpm #(.N_PORTS(NP), .CELL_AW(AW), .SLOT_CYCLES(SLOT)) dut (.*);

  voq #(.N_PORTS(NP), .CELL_AW(AW)) u_voq (
    .clk, .rst_n,
    .enq(voq_enq || tb_enq), .enq_port(tb_enq ? tb_port : voq_enq_port),
    .enq_addr(tb_enq ? tb_addr : voq_enq_addr), .enq_tail(voq_tail), .enq_empty(voq_empty),
    .deq(voq_deq), .deq_port(voq_deq_port), .deq_next(voq_deq_next),
    .head_port(voq_head_port), .head_addr(voq_head_addr), .head_len(voq_head_len), .q_len);

  sram_model #(.AW(AW+1), .DW(36)) u_mem (
    .clk, .wr_en(pm_wr_en || tb_wr), .wr_addr(tb_wr ? tb_wr_addr : pm_wr_addr),
    .wr_data(tb_wr ? tb_wr_data : pm_wr_data),
    .rd_en(pm_rd_en), .rd_addr(pm_rd_addr), .rd_data(pm_rd_data));

  int checks = 0, failures = 0;
  bm_ref m;
  int freel[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_free = 0, n_stitch = 0, n_err = 0, exp, gp, na;
    bit gv, send, st_exp, was_empty;
    int unsigned bm;
    int st_port_exp, st_addr_exp, st_bm_exp;
    m = new(NP, 1 << AW, 1000);
    for (int a = 0; a < (1 << AW); a++) freel.push_back(a);
    phase = 0; grant_valid = 0; grant_port = 0; tb_enq = 0; tb_wr = 0;
    tb_port = 0; tb_addr = 0; tb_wr_addr = 0; tb_wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 1500; s++) begin
      // choose a grant from the queues as they are now
      gv = $urandom_range(0, 9) != 0;
      gp = $urandom_range(0, 3);
      begin
        int c[$];
        c.delete();
        for (int p = 0; p < NP; p++) if (m.q[p].size() > 0) c.push_back(p);
        if (c.size() > 0 && $urandom_range(0, 9) != 0) gp = c[$urandom_range(0, c.size() - 1)];
      end
      for (int p = 0; p < NP; p++) check(q_len[p] == m.q[p].size(), "queue length");
      was_empty = m.q[gp].size() == 0;
      st_exp = m.st_pend;
      st_port_exp = m.st_port; st_addr_exp = m.st_id;
      st_bm_exp = st_exp ? m.rest_bm[m.st_id] : 0;
      m.stitch();
      exp = (gv && !was_empty) ? m.serve(gp) : -1;
      for (int ph = 0; ph < SLOT; ph++) begin
        @(negedge clk);
        phase = 4'(ph);
        grant_valid = (ph == 0) && gv;
        grant_port  = 4'(gp);
        tb_enq = 0; tb_wr = 0;
        if (ph == 8) begin
          send = freel.size() > 0 && $urandom_range(0, 9) < 7;
          if (send) begin
            na = freel.pop_front();
            bm = ($urandom_range(0, 2) == 0) ? ($urandom & 32'h000f) : (1 << $urandom_range(0, 3));
            if (bm == 0) bm = 1;
            tb_port = 4'(m.lowest(bm));
            tb_addr = AW'(na);
            tb_enq  = 1;
            tb_wr   = !voq_empty_now(tb_port);
            tb_wr_addr = {voq_tail_now(tb_port), 1'b0};
            tb_wr_data = 36'(na);
            void'(m.arrive(na, bm));
          end
        end
        if (ph == 9 && send) begin
          tb_wr = 1;
          tb_wr_addr = {AW'(na), 1'b1};
          tb_wr_data = 36'(bm);
        end
        #1;
        if (ph == 0) begin
          check(err == (gv && was_empty), "error on grant for an empty queue");
          if (gv && was_empty) n_err++;
        end
        if (ph == 1) begin
          check(cur_valid == (exp >= 0), "head valid");
          if (exp >= 0) check(cur_addr == AW'(exp) && cur_port == 4'(gp), "head address");
        end
        if (ph == 2) begin
          check(pm_stitch == st_exp, "stitch on phase 2");
          if (st_exp) begin
            check(pm_stitch_port == 4'(st_port_exp) && voq_enq && voq_enq_addr == AW'(st_addr_exp),
                  "stitch port and address");
            n_stitch++;
          end
        end
        if (ph == 3 && st_exp)
          check(pm_wr_en && pm_wr_addr == {AW'(st_addr_exp), 1'b1} &&
                pm_wr_data == 36'(st_bm_exp), "reduced bitmap written back");
        if (ph == 7) begin
          bit fr;
          fr = (exp >= 0) && !m.st_pend_for(exp);
          check(idq_push == fr, "free on phase 7");
          if (fr) begin
            check(idq_addr == AW'(exp), "freed address");
            freel.push_back(exp);
            n_free++;
          end
        end
      end
    end
    check(n_free > 0 && n_stitch > 0 && n_err > 0, "free, stitch and empty-grant paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic voq_empty_now(logic [3:0] p);
    return q_len[p] == '0;
  endfunction
  function automatic logic [AW-1:0] voq_tail_now(logic [3:0] p);
    return u_voq.otr[p];
  endfunction
endmodule

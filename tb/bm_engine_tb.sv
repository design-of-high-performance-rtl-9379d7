// bm_engine_tb: self-checking test of the buffer engine.
//
// The engine runs with a 32-cell buffer and a queue limit of 6 so that every
// admission rule is reached. Each slot the bench may send a cell (unicast,
// multicast or with an empty bitmap) and names a queue to serve, usually a
// non-empty one, sometimes an empty one. A slot-level reference model
// (bm_ref_pkg) predicts admissions, multicast stitching, which cell leaves
// and the free-buffer count; the bench compares every output beat, the
// departure port, the first-beat timing (phase 2 of the serving slot), the
// drop and error pulses, the queue lengths and the free count. It ends by
// draining every queue and checking that all buffers are free again.
module bm_engine_tb;
  import bm_ref_pkg::*;

  localparam int unsigned NP = 16, AW = 5, PW36 = 36, BW72 = 72, NB = 6;
  localparam int unsigned SLOT = 10, QL = 6, BIW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  init_done, soc, slot_end;
  logic [3:0]            phase;
  logic                  in_valid;
  logic [BW72-1:0]       in_data;
  logic                  sel_valid;
  logic [3:0]            sel_port;
  logic                  out_valid, out_sop;
  logic [3:0]            out_port;
  logic [BW72-1:0]       out_data;
  logic                  arr_valid, st_valid, drop, err;
  logic [3:0]            arr_port, st_port;
  logic [31:0]           drop_cnt;
  logic [AW:0]           free_cnt;
  logic [NP-1:0][AW:0]   q_len;
  logic                  pm_rd_en, pm_wr_en, bm_wr_en, bm_rd_en;
  logic [AW:0]           pm_rd_addr, pm_wr_addr;
  logic [PW36-1:0]       pm_rd_data, pm_wr_data;
  logic [AW+BIW-1:0]     bm_wr_addr, bm_rd_addr;
  logic [BW72-1:0]       bm_wr_data, bm_rd_data;

  bm_engine #(.N_PORTS(NP), .CELL_AW(AW), .Q_LIMIT(QL)) dut (.*);

  sram_model #(.AW(AW+1), .DW(PW36)) u_inpm (
    .clk, .wr_en(pm_wr_en), .wr_addr(pm_wr_addr), .wr_data(pm_wr_data),
    .rd_en(pm_rd_en), .rd_addr(pm_rd_addr), .rd_data(pm_rd_data));
  sram_model #(.AW(AW+BIW), .DW(BW72)) u_inbm (
    .clk, .wr_en(bm_wr_en), .wr_addr(bm_wr_addr), .wr_data(bm_wr_data),
    .rd_en(bm_rd_en), .rd_addr(bm_rd_addr), .rd_data(bm_rd_data));

  int checks = 0, failures = 0;
  bm_ref model;
  int unsigned bm_of[int];

  function automatic logic [BW72-1:0] beat_of(int id, int unsigned bm, int k);
    if (k == 0) return {bm[15:0], 24'h0, id[31:0]};
    return {8'(k), id[31:0], id[31:0] ^ (32'h9e3779b9 * k)};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_err = 0, n_full = 0, n_limit = 0, n_zero = 0, n_mc = 0, n_served = 0;
  int n_emptyfree = 0;

  task automatic run_slot(bit send, int id, int unsigned bm, bit sv, int sp,
                          ref bit prev_v, ref int prev_id);
    bit acc;
    int exp;
    bit was_empty;
    // phase 0 of this slot
    while (phase != 0) @(negedge clk);
    check(free_cnt == model.free_cells, $sformatf("free %0d vs %0d", free_cnt, model.free_cells));
    for (int p = 0; p < NP; p++)
      check(q_len[p] == model.q[p].size(), $sformatf("qlen[%0d] %0d vs %0d", p, q_len[p], model.q[p].size()));
    was_empty = (model.q[sp].size() == 0);
    if (prev_v) begin
      int unsigned pb = bm_of[prev_id];
      int nd = model.n_drop, nf = model.n_drop_full, nl = model.n_drop_limit;
      acc = model.arrive(prev_id, pb);
      if (pb == 0) n_zero++;
      if (model.n_drop_full != nf) n_full++;
      if (model.n_drop_limit != nl) n_limit++;
      check(drop == !acc, $sformatf("drop %0d for cell %0d", drop, prev_id));
      check(arr_valid == acc, "arrival event");
    end else begin
      check(!drop && !arr_valid, "no cell, no admission");
    end
    if (model.free_cells == 0) n_emptyfree++;
    model.stitch();
    exp = -1;
    if (sv && !was_empty) exp = model.serve(sp);
    sel_valid = sv;
    sel_port  = 4'(sp);
    in_valid  = send;
    in_data   = beat_of(id, bm, 0);
    #1;
    check(err == (sv && exp < 0), "grant on empty queue flagged");
    if (sv && exp < 0) n_err++;
    for (int k = 1; k < SLOT; k++) begin
      @(negedge clk);
      sel_valid = 0;
      in_valid  = send && (k < NB);
      in_data   = beat_of(id, bm, k);
      if (k == 2) begin
        check(st_valid == st_seen_pending, "stitch on phase 2 of the next slot");
      end
      if (k >= 2 && k < 2 + NB && exp >= 0) begin
        check(out_valid && out_port == 4'(sp), $sformatf("out valid/port at phase %0d", k));
        check(out_sop == (k == 2), "sop on phase 2");
        check(out_data == beat_of(exp, bm_of[exp], k - 2),
              $sformatf("beat %0d of cell %0d: %h", k - 2, exp, out_data));
      end else begin
        check(!out_valid, $sformatf("no output at phase %0d", k));
      end
    end
    if (exp >= 0) n_served++;
    prev_v  = send;
    prev_id = id;
  endtask

  bit st_seen_pending;

  initial begin
    bit   prev_v = 0;
    int   prev_id = 0;
    int   id = 0;
    int unsigned bm;
    int   sp;
    bit   sv;
    int   mode;
    model = new(NP, 1 << AW, QL);
    in_valid = 0; in_data = '0; sel_valid = 0; sel_port = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    check(free_cnt == (1 << AW), "all buffers free after init");
    // 600 random slots, then drain
    for (int s = 0; s < 900; s++) begin
      bit send;
      mode = (s < 600) ? 0 : 1;
      send = (mode == 0) && ($urandom_range(0, 9) < 8);
      id++;
      case ($urandom_range(0, 9))
        0:       bm = 0;
        1, 2, 3: bm = $urandom_range(1, 16'hffff) & $urandom_range(1, 16'hffff) & $urandom_range(1, 16'hffff);
        default: bm = 1 << $urandom_range(0, 3);
      endcase
      if (send) bm_of[id] = bm;
      // serve: mostly a non-empty queue, sometimes none or an empty one
      sv = 0; sp = 0;
      if ($urandom_range(0, 9) < ((s < 300) ? 4 : 9)) begin
        int cands[$];
        model_peek(cands);
        if (cands.size() > 0 && $urandom_range(0, 19) != 0) begin
          sv = 1; sp = cands[$urandom_range(0, cands.size() - 1)];
        end else if ($urandom_range(0, 1) == 0) begin
          int e[$];
          e.delete();
          for (int p = 0; p < NP; p++) if (pending_size(p) == 0) e.push_back(p);
          if (e.size() > 0) begin sv = 1; sp = e[$urandom_range(0, e.size() - 1)]; end
        end
      end
      st_seen_pending = model.st_pend;
      run_slot(send, id, bm, sv, sp, prev_v, prev_id);
    end
    // final state
    while (phase != 0) @(negedge clk);
    repeat (SLOT) @(negedge clk);
    check(model.total() == 0, "model drained");
    check(free_cnt == (1 << AW), $sformatf("all buffers free at end (%0d)", free_cnt));
    $display("served=%0d stitches=%0d drops_full=%0d drops_limit=%0d zero_bitmap=%0d empty_grants=%0d idle_empty_slots=%0d",
             n_served, model.n_stitch, n_full, n_limit, n_zero, n_err, n_emptyfree);
    check(model.n_stitch > 0, "multicast stitching happened");
    check(n_full > 0, "buffer-full drop happened");
    check(n_limit > 0, "queue-limit drop happened");
    check(n_zero > 0, "empty-bitmap drop happened");
    check(n_err > 0, "grant on empty queue happened");
    check(n_served > 100, "cells served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Queue sizes as they will be when this slot's serve happens: after the
  // pending arrival and the pending stitch.
  function automatic int pending_size(int p);
    return model.q[p].size();
  endfunction
  task automatic model_peek(output int c[$]);
    c.delete();
    for (int p = 0; p < NP; p++) if (model.q[p].size() > 0) c.push_back(p);
  endtask
endmodule

// ingress_bm_tb: self-checking test of the ingress buffer manager with a
// small buffer (64 cells, queue limit 10) and a request/grant round trip of
// 3 slots.
//
// The bench plays the port processor and the central arbiter. The arbiter
// answers each request vector exactly RFC_DEPTH slots later, granting one of
// the requesting ports or none; a request it declines must be re-sent by the
// request FIFO controller in the next slot. A slot-level reference model
// predicts admissions, multicast stitching and the cell order; every output
// beat, the output port and the first-beat phase (2 clocks after the slot
// start, i.e. the slot after the grant) are checked. Random traffic is
// followed by a fill with grants withheld (queue-limit and buffer-full drops)
// and a drain after which all buffers must be free.
module ingress_bm_tb;
  import bm_ref_pkg::*;

  localparam int unsigned NP = 16, AW = 6;
  localparam int unsigned NB = bm_pkg::CELL_BEATS, SLOT = bm_pkg::SLOT_CYCLES;
  localparam int unsigned QL = 10, D = 3;
  localparam int unsigned BIW = $clog2(NB);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  ig_init_done, ig_soc, ig_slot_end;
  logic                  ig_in_valid;
  logic [71:0]           ig_in_data;
  logic                  ig_out_valid, ig_out_sop;
  logic [3:0]            ig_out_port;
  logic [71:0]           ig_out_data;
  logic [NP-1:0]         ig_arb_req;
  logic                  ig_arb_grant_valid;
  logic [3:0]            ig_arb_grant_port;
  logic                  ig_drop, ig_stitch, ig_err, ig_spurious;
  logic [AW:0]           ig_free_cnt;
  logic [NP-1:0][AW:0]   ig_q_len;
  logic                  inpm_rd_en, inpm_wr_en, inbm_wr_en, inbm_rd_en;
  logic [AW:0]           inpm_rd_addr, inpm_wr_addr;
  logic [35:0]           inpm_rd_data, inpm_wr_data;
  logic [AW+BIW-1:0]     inbm_wr_addr, inbm_rd_addr;
  logic [71:0]           inbm_wr_data, inbm_rd_data;

  ingress_bm #(.N_PORTS(NP), .CELL_AW(AW), .Q_LIMIT(QL), .RFC_DEPTH(D)) dut (
    .clk, .rst_n, .init_done(ig_init_done), .soc(ig_soc), .slot_end(ig_slot_end),
    .in_valid(ig_in_valid), .in_data(ig_in_data),
    .out_valid(ig_out_valid), .out_sop(ig_out_sop), .out_port(ig_out_port),
    .out_data(ig_out_data), .arb_req(ig_arb_req),
    .arb_grant_valid(ig_arb_grant_valid), .arb_grant_port(ig_arb_grant_port),
    .drop(ig_drop), .st_valid(ig_stitch), .err(ig_err), .spurious(ig_spurious),
    .free_cnt(ig_free_cnt), .q_len(ig_q_len),
    .pm_rd_en(inpm_rd_en), .pm_rd_addr(inpm_rd_addr), .pm_rd_data(inpm_rd_data),
    .pm_wr_en(inpm_wr_en), .pm_wr_addr(inpm_wr_addr), .pm_wr_data(inpm_wr_data),
    .bm_wr_en(inbm_wr_en), .bm_wr_addr(inbm_wr_addr), .bm_wr_data(inbm_wr_data),
    .bm_rd_en(inbm_rd_en), .bm_rd_addr(inbm_rd_addr), .bm_rd_data(inbm_rd_data));

  sram_model #(.AW(AW+1), .DW(36)) u_inpm (
    .clk, .wr_en(inpm_wr_en), .wr_addr(inpm_wr_addr), .wr_data(inpm_wr_data),
    .rd_en(inpm_rd_en), .rd_addr(inpm_rd_addr), .rd_data(inpm_rd_data));
  sram_model #(.AW(AW+BIW), .DW(72)) u_inbm (
    .clk, .wr_en(inbm_wr_en), .wr_addr(inbm_wr_addr), .wr_data(inbm_wr_data),
    .rd_en(inbm_rd_en), .rd_addr(inbm_rd_addr), .rd_data(inbm_rd_data));

  int checks = 0, failures = 0;

  function automatic logic [71:0] beat_of(int id, int unsigned bm, int k);
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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // errors that must never show
  always @(posedge clk) if (rst_n && (ig_err || ig_spurious)) begin
    failures++;
    $display("FAIL t=%0t err/spurious pulse", $time);
  end

  bm_ref ig;
  int unsigned bm_of[int];          // ingress id -> bitmap
  logic [NP-1:0] req_hist[$];
  int n_declined = 0, n_resent_ok = 0, n_grants = 0, n_b2b = 0;
  int n_full = 0, n_limit = 0, n_zero = 0, n_ig_served = 0;
  int n_idle_empty = 0;
  int noreq [NP] = '{default: 0};  // slots a non-empty queue has gone without a request

  initial begin
    bit   ig_prev_v = 0;
    int   ig_prev_id = 0;
    int   id = 0;
    bit   g_prev_v = 0;
    int   g_prev_p = 0;
    int   ig_exp;
    logic [NP-1:0] declined [$];
    int   last_out_slot = -10;

    ig = new(NP, 1 << AW, QL);
    ig_in_valid = 0; ig_in_data = '0; ig_arb_grant_valid = 0; ig_arb_grant_port = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (ig_init_done);
    check(ig_free_cnt == (1 << AW), "all buffers free after init");

    for (int s = 0; ; s++) begin
      bit   send, acc, gv;
      int   gp, stage, pg;
      int unsigned bm;
      logic [NP-1:0] req, old_req, dec;
      bit   ig_was_empty;
      // stage 0: random traffic; 1: fill with grants withheld; 2: drain
      stage = (s < 800) ? 0 : ((ig.n_drop_full < 20) ? 1 : 2);
      if (stage == 2 && ig.total() == 0 && !ig.st_pend &&
          req_hist.size() > 0 && s > 800 + 8 && ig_free_cnt == (1 << AW))
        break;
      if (s > 40000) begin check(0, "did not drain"); break; end

      while (!ig_soc) @(negedge clk);
      // ---------------- ingress, phase 0 ----------------
      req = ig_arb_req;
      req_hist.push_back(req);
      check(ig_free_cnt == ig.free_cells, $sformatf("ig free %0d vs %0d", ig_free_cnt, ig.free_cells));
      for (int p = 0; p < NP; p++)
        check(ig_q_len[p] == ig.q[p].size(), $sformatf("ig qlen[%0d]", p));
      // a queue holding cells is asked for at least once per round trip
      for (int p = 0; p < NP; p++) begin
        if (req[p] || ig.q[p].size() == 0) noreq[p] = 0;
        else begin
          noreq[p]++;
          check(noreq[p] <= 2 * D + 4, $sformatf("queue %0d holds cells but sends no request", p));
        end
      end
      // requests turned down D slots ago must be here again
      if (declined.size() > 0) begin
        dec = declined.pop_front();
        for (int p = 0; p < NP; p++) if (dec[p]) begin
          check(req[p], $sformatf("declined request of port %0d re-sent", p));
          n_resent_ok += req[p];
        end
      end
      ig_was_empty = g_prev_v && ig.q[g_prev_p].size() == 0;
      check(!ig_was_empty, "grant for a queue with no cell");
      if (ig_prev_v) begin
        int unsigned pb;
        int nf, nl;
        pb = bm_of[ig_prev_id];
        nf = ig.n_drop_full;
        nl = ig.n_drop_limit;
        acc = ig.arrive(ig_prev_id, pb);
        if (pb == 0) n_zero++;
        if (ig.n_drop_full != nf) n_full++;
        if (ig.n_drop_limit != nl) n_limit++;
        check(ig_drop == !acc, $sformatf("ig drop for cell %0d", ig_prev_id));
      end else check(!ig_drop, "ig no drop without a cell");
      if (ig.free_cells == 0) n_idle_empty++;
      ig.stitch();
      ig_exp = g_prev_v ? ig.serve(g_prev_p) : -1;
      // arbiter: answer the request vector of D-1 slots ago
      gv = 0; gp = 0; dec = '0;
      pg = (stage == 0) ? 90 : ((stage == 1) ? 0 : 100);
      if (req_hist.size() >= D) begin
        old_req = req_hist[req_hist.size() - D];
        if (old_req != '0 && $urandom_range(0, 99) < pg) begin
          int c[$];
          c.delete();
          for (int p = 0; p < NP; p++) if (old_req[p]) c.push_back(p);
          gp = c[$urandom_range(0, c.size() - 1)];
          gv = 1;
          n_grants++;
        end
        dec = old_req;
        if (gv) dec[gp] = 1'b0;
        for (int p = 0; p < NP; p++) n_declined += dec[p];
      end
      declined.push_back(dec);
      ig_arb_grant_valid = gv;
      ig_arb_grant_port  = 4'(gp);
      // next incoming cell
      case (stage)
        0: send = ($urandom_range(0, 99) < 95);
        1: send = 1;
        default: send = 0;
      endcase
      id++;
      if (stage == 1) begin
        bm = 1 << (5 + (ig.n_drop_limit < 3 ? 0 : ((s / (QL + 5)) % 8)));
      end else begin
        case ($urandom_range(0, 19))
          0:          bm = 0;
          1, 2, 3, 4: bm = $urandom_range(1, 16'hffff) & $urandom_range(1, 16'hffff);
          default:    bm = 1 << $urandom_range(0, NP - 1);
        endcase
      end
      if (send) bm_of[id] = bm;
      ig_in_valid = send;
      ig_in_data  = beat_of(id, bm, 0);


      // ---------------- phases 1 .. SLOT-1 ----------------
      for (int k = 1; k < SLOT; k++) begin
        @(negedge clk);
        ig_in_valid  = send && (k < NB);
        ig_in_data   = beat_of(id, bm, k);
        if (k >= 2 && k < 2 + NB && ig_exp >= 0) begin
          check(ig_out_valid && ig_out_port == 4'(g_prev_p) && ig_out_sop == (k == 2),
                $sformatf("ig out valid/port/sop at phase %0d", k));
          check(ig_out_data == beat_of(ig_exp, bm_of[ig_exp], k - 2),
                $sformatf("ig beat %0d of cell %0d", k - 2, ig_exp));
        end else check(!ig_out_valid, "ig no output");
      end
      if (ig_exp >= 0) begin
        n_ig_served++;
        if (last_out_slot == s - 1) n_b2b++;
        last_out_slot = s;
      end
      ig_prev_v  = send;
      ig_prev_id = id;
      g_prev_v   = gv;
      g_prev_p   = gp;
    end

    $display("ingress: served=%0d grants=%0d stitches=%0d drops full=%0d limit=%0d zero=%0d declined=%0d resent=%0d b2b=%0d idle_empty_slots=%0d",
             n_ig_served, n_grants, ig.n_stitch, n_full, n_limit, n_zero, n_declined, n_resent_ok, n_b2b, n_idle_empty);
    check(ig.n_stitch > 0, "ingress multicast stitching happened");
    check(n_limit > 0, "queue-limit drop happened");
    check(n_full > 0, "buffer-full drop happened");
    check(n_zero > 0, "empty-bitmap drop happened");
    check(n_resent_ok > 0, "declined request re-sent");
    check(n_b2b > 0, "cells sent in consecutive slots");
    check(n_ig_served > 0, "cells delivered");
    check(ig_free_cnt == (1 << AW), "all buffers free at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


endmodule

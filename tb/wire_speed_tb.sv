// wire_speed_tb: the port card at line rate, every parameter at its default.
//
// A cell enters the ingress manager in every slot (unicast, uniformly random
// destination), the central arbiter model grants one of the requested ports
// in every slot, each ingress output cell is fed to the egress manager in the
// next slot, and the egress side serves a non-empty queue in every slot. This
// is the rate the port card is built for: one 53-byte cell in and one out
// per 10-clock slot, 160 ns at 62.5 MHz.
// Checked: no cell is dropped; cells of each queue leave in order and intact;
// once the queues are backlogged, both managers send a cell in every slot,
// and consecutive start-of-cell pulses are exactly SLOT_CYCLES clocks apart;
// the cell rate this gives at 62.5 MHz, 424 bits per slot, reaches the
// OC-48c line rate of 2.488 Gb/s.
module wire_speed_tb;
  import bm_ref_pkg::*;

  localparam int unsigned NP = bm_pkg::N_PORTS, AW = bm_pkg::CELL_AW;
  localparam int unsigned NB = bm_pkg::CELL_BEATS, SLOT = bm_pkg::SLOT_CYCLES;
  localparam int unsigned QL = bm_pkg::Q_LIMIT, D = bm_pkg::RFC_DEPTH;
  localparam int unsigned BIW = $clog2(NB);
  localparam int unsigned N_SLOTS = 4000, WARM = 200;
  localparam real CLK_NS = 16.0;     // 62.5 MHz
  localparam real OC48C_GBPS = 2.48832;

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
  logic                  eg_init_done, eg_soc;
  logic                  eg_in_valid;
  logic [71:0]           eg_in_data;
  logic                  eg_sel_valid;
  logic [3:0]            eg_sel_port;
  logic                  eg_out_valid, eg_out_sop;
  logic [3:0]            eg_out_port;
  logic [71:0]           eg_out_data;
  logic                  eg_drop, eg_stitch, eg_err;
  logic [AW:0]           eg_free_cnt;
  logic [NP-1:0][AW:0]   eg_q_len;
  logic                  egpm_rd_en, egpm_wr_en, egbm_wr_en, egbm_rd_en;
  logic [AW:0]           egpm_rd_addr, egpm_wr_addr;
  logic [35:0]           egpm_rd_data, egpm_wr_data;
  logic [AW+BIW-1:0]     egbm_wr_addr, egbm_rd_addr;
  logic [71:0]           egbm_wr_data, egbm_rd_data;

  buffer_manager_top dut (.*);

  sram_model #(.AW(AW+1), .DW(36)) u_inpm (
    .clk, .wr_en(inpm_wr_en), .wr_addr(inpm_wr_addr), .wr_data(inpm_wr_data),
    .rd_en(inpm_rd_en), .rd_addr(inpm_rd_addr), .rd_data(inpm_rd_data));
  sram_model #(.AW(AW+BIW), .DW(72)) u_inbm (
    .clk, .wr_en(inbm_wr_en), .wr_addr(inbm_wr_addr), .wr_data(inbm_wr_data),
    .rd_en(inbm_rd_en), .rd_addr(inbm_rd_addr), .rd_data(inbm_rd_data));
  sram_model #(.AW(AW+1), .DW(36)) u_egpm (
    .clk, .wr_en(egpm_wr_en), .wr_addr(egpm_wr_addr), .wr_data(egpm_wr_data),
    .rd_en(egpm_rd_en), .rd_addr(egpm_rd_addr), .rd_data(egpm_rd_data));
  sram_model #(.AW(AW+BIW), .DW(72)) u_egbm (
    .clk, .wr_en(egbm_wr_en), .wr_addr(egbm_wr_addr), .wr_data(egbm_wr_data),
    .rd_en(egbm_rd_en), .rd_addr(egbm_rd_addr), .rd_data(egbm_rd_data));

  int checks = 0, failures = 0;

  function automatic logic [71:0] beat_of(int id, int unsigned bm, int k);
    if (k == 0) return {bm[15:0], 24'h0, id[31:0]};
    return {8'(k), id[31:0], id[31:0] ^ (32'h7f4a7c15 * k)};
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

  always @(posedge clk) if (rst_n && (ig_err || ig_spurious || eg_err)) begin
    failures++;
    $display("FAIL t=%0t err/spurious pulse", $time);
  end

  // clocks between consecutive start-of-cell pulses on each output
  longint cyc = 0, ig_last_sop = -1, eg_last_sop = -1;
  int n_ig_gap = 0, n_eg_gap = 0;
  bit measuring = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ig_out_valid && ig_out_sop) begin
      if (measuring && ig_last_sop >= 0) begin
        check(cyc - ig_last_sop == SLOT, $sformatf("ingress cell spacing %0d clocks", cyc - ig_last_sop));
        n_ig_gap++;
      end
      ig_last_sop <= cyc;
    end
    if (eg_out_valid && eg_out_sop) begin
      if (measuring && eg_last_sop >= 0) begin
        check(cyc - eg_last_sop == SLOT, $sformatf("egress cell spacing %0d clocks", cyc - eg_last_sop));
        n_eg_gap++;
      end
      eg_last_sop <= cyc;
    end
  end

  bm_ref ig, eg;
  int unsigned bm_of[int];
  int          eg_orig[int];
  logic [NP-1:0] req_hist[$];
  logic [NB-1:0][71:0] eg_cell, eg_cell_next;
  int n_in = 0, n_ig_out = 0, n_eg_out = 0, n_ig_busy = 0, n_eg_busy = 0;

  initial begin
    bit ig_prev_v = 0, eg_prev_v = 0, eg_send = 0;
    int ig_prev_id = 0, eg_prev_id = 0, eg_send_id = 0;
    int id = 0, eid = 0;
    bit g_prev_v = 0;
    int g_prev_p = 0;
    real gbps;

    ig = new(NP, 1 << AW, QL);
    eg = new(NP, 1 << AW, QL);
    ig_in_valid = 0; ig_in_data = '0; ig_arb_grant_valid = 0; ig_arb_grant_port = '0;
    eg_in_valid = 0; eg_in_data = '0; eg_sel_valid = 0; eg_sel_port = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (ig_init_done && eg_init_done);

    for (int s = 0; s < N_SLOTS; s++) begin
      bit acc, gv, eg_sv;
      int gp, eg_sp, ig_exp, eg_exp;
      int unsigned bm;
      logic [NP-1:0] old_req;

      while (!ig_soc) @(negedge clk);
      measuring = (s >= WARM);
      req_hist.push_back(ig_arb_req);
      // ingress: admission of last slot's cell, then the granted cell
      if (ig_prev_v) begin
        acc = ig.arrive(ig_prev_id, bm_of[ig_prev_id]);
        check(acc && !ig_drop, "ingress cell admitted");
      end
      ig.stitch();
      ig_exp = g_prev_v ? ig.serve(g_prev_p) : -1;
      // arbiter: grant one of the ports requested D slots ago, every slot
      gv = 0; gp = 0;
      if (req_hist.size() >= D) begin
        old_req = req_hist[req_hist.size() - D];
        if (old_req != '0) begin
          int c[$];
          c.delete();
          for (int p = 0; p < NP; p++) if (old_req[p]) c.push_back(p);
          gp = c[$urandom_range(0, c.size() - 1)];
          gv = 1;
        end
      end
      ig_arb_grant_valid = gv;
      ig_arb_grant_port  = 4'(gp);
      // a new unicast cell every slot
      id++;
      bm = 1 << $urandom_range(0, NP - 1);
      bm_of[id] = bm;
      ig_in_valid = 1;
      ig_in_data  = beat_of(id, bm, 0);
      n_in++;

      // egress: serve a queue that held a cell before this slot's admission
      eg_sv = 0; eg_sp = 0;
      begin
        int c[$];
        c.delete();
        for (int p = 0; p < NP; p++) if (eg.q[p].size() > 0) c.push_back(p);
        if (c.size() > 0) begin
          eg_sv = 1;
          eg_sp = c[$urandom_range(0, c.size() - 1)];
        end
      end
      if (eg_prev_v) begin
        acc = eg.arrive(eg_prev_id, bm_of[eg_orig[eg_prev_id]]);
        check(acc && !eg_drop, "egress cell admitted");
      end
      eg.stitch();
      eg_exp = eg_sv ? eg.serve(eg_sp) : -1;
      eg_sel_valid = eg_sv;
      eg_sel_port  = 4'(eg_sp);
      eg_in_valid  = eg_send;
      eg_prev_v    = eg_send;
      eg_prev_id   = eg_send_id;
      eg_send      = 0;
      eg_in_data   = eg_cell[0];

      for (int k = 1; k < SLOT; k++) begin
        @(negedge clk);
        ig_in_valid  = (k < NB);
        ig_in_data   = beat_of(id, bm, k);
        eg_sel_valid = 0;
        eg_in_valid  = eg_prev_v && (k < NB);
        eg_in_data   = eg_cell[k < NB ? k : 0];
        if (k >= 2 && k < 2 + NB && ig_exp >= 0) begin
          check(ig_out_valid && ig_out_port == 4'(g_prev_p) &&
                ig_out_data == beat_of(ig_exp, bm_of[ig_exp], k - 2),
                $sformatf("ingress beat %0d of cell %0d", k - 2, ig_exp));
          eg_cell_next[k - 2] = ig_out_data;
        end
        if (k >= 2 && k < 2 + NB && eg_exp >= 0) begin
          int o;
          o = eg_orig[eg_exp];
          check(eg_out_valid && eg_out_port == 4'(eg_sp) &&
                eg_out_data == beat_of(o, bm_of[o], k - 2),
                $sformatf("egress beat %0d of cell %0d", k - 2, o));
        end
      end
      if (ig_exp >= 0) begin
        n_ig_out++;
        if (measuring) n_ig_busy++;
        eid++;
        eg_orig[eid] = ig_exp;
        eg_send    = 1;
        eg_send_id = eid;
        eg_cell    = eg_cell_next;
      end
      if (eg_exp >= 0) begin
        n_eg_out++;
        if (measuring) n_eg_busy++;
      end
      ig_prev_v  = 1;
      ig_prev_id = id;
      g_prev_v   = gv;
      g_prev_p   = gp;
    end

    gbps = real'(53 * 8) * real'(n_ig_busy) / (real'((N_SLOTS - WARM) * SLOT) * CLK_NS);
    $display("cells in=%0d ingress out=%0d egress out=%0d; busy slots after warm-up: ingress %0d, egress %0d of %0d",
             n_in, n_ig_out, n_eg_out, n_ig_busy, n_eg_busy, N_SLOTS - WARM);
    $display("ingress cell rate %0.3f Gb/s of 53-byte cells (OC-48c line rate %0.3f Gb/s)", gbps, OC48C_GBPS);
    check(n_ig_busy == N_SLOTS - WARM, "ingress sends a cell in every slot once backlogged");
    check(n_eg_busy == N_SLOTS - WARM, "egress sends a cell in every slot once backlogged");
    check(n_ig_gap >= N_SLOTS - WARM - 1 && n_eg_gap >= N_SLOTS - WARM - 1, "cell spacing measured");
    check(gbps >= OC48C_GBPS, "cell rate reaches the OC-48c line rate");
    check(ig.n_drop == 0 && eg.n_drop == 0, "no cell dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

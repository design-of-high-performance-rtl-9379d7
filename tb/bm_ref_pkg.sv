// bm_ref_pkg: reference model of the queueing behaviour of one buffer
// manager, used by the testbenches to predict which cell leaves next.
// It works at cell-slot level, in the order the hardware does the work of a
// slot: admit the cell received in the previous slot, stitch the multicast
// cell served in the previous slot into its next leaf's queue, then serve
// the granted queue. Cells are tracked by an integer id.
package bm_ref_pkg;

  class bm_ref;
    int unsigned n_ports;
    int unsigned q_limit;
    int unsigned free_cells;
    int          q[][$];
    int unsigned rest_bm[int];
    bit          st_pend;
    int          st_id;
    int unsigned st_port;
    int unsigned n_stitch, n_drop, n_drop_full, n_drop_limit, n_freed;

    function new(int unsigned np, int unsigned cells, int unsigned qlim);
      n_ports    = np;
      q_limit    = qlim;
      free_cells = cells;
      q          = new[np];
      st_pend    = 0;
      n_stitch = 0; n_drop = 0; n_drop_full = 0; n_drop_limit = 0; n_freed = 0;
    endfunction

    static function int lowest(int unsigned bm);
      for (int i = 0; i < 32; i++) if (bm[i]) return i;
      return -1;
    endfunction

    // Admission of a cell; returns 1 if it is stored.
    function bit arrive(int id, int unsigned bm);
      int f;
      f = lowest(bm);
      if (f < 0) begin n_drop++; return 0; end
      if (free_cells == 0) begin n_drop++; n_drop_full++; return 0; end
      if (q[f].size() >= q_limit) begin n_drop++; n_drop_limit++; return 0; end
      free_cells--;
      q[f].push_back(id);
      rest_bm[id] = bm;
      return 1;
    endfunction

    function void stitch();
      if (st_pend) begin
        q[st_port].push_back(st_id);
        st_pend = 0;
        n_stitch++;
      end
    endfunction

    // Serve queue `port`; returns the id sent, or -1 if the queue is empty.
    function int serve(int unsigned port);
      int id;
      int unsigned rest;
      if (q[port].size() == 0) return -1;
      id   = q[port].pop_front();
      rest = rest_bm[id] & ~(32'd1 << port);
      if (rest == 0) begin
        free_cells++;
        n_freed++;
        rest_bm.delete(id);
      end else begin
        rest_bm[id] = rest;
        st_pend = 1;
        st_id   = id;
        st_port = lowest(rest);
      end
      return id;
    endfunction

    // True if cell `id` was just served and still has leaves to go.
    function bit st_pend_for(int id);
      return st_pend && st_id == id;
    endfunction

    function int unsigned total();
      int unsigned t = 0;
      foreach (q[i]) t += q[i].size();
      return t;
    endfunction
  endclass

endpackage

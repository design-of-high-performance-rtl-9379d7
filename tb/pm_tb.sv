// pm_tb: checks the policing module.
// Random arrivals (unicast, multicast, empty bitmap), stitches and
// departures are applied on separate clocks; the bench keeps its own queue
// lengths and checks the admission decision (non-empty bitmap, free buffer,
// first leaf below the limit of 5), the first-leaf port, the drop pulse and
// counter, the events passed on and every queue length.
module pm_tb;
  localparam int NP = 16, AW = 6, QL = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic decide, hdr_valid, idle_avail, accept, drop, stitch, depart;
  logic arr_valid, st_valid;
  logic [NP-1:0] hdr_bitmap;
  logic [3:0] dest_port, stitch_port, depart_port, arr_port, st_port;
  logic [31:0] drop_cnt;
  logic [NP-1:0][AW:0] len;

  pm #(.N_PORTS(NP), .CELL_AW(AW), .Q_LIMIT(QL)) dut (.*);

  int checks = 0, failures = 0;
  int ml[NP];
  int drops = 0;

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
    int n_lim = 0, n_full = 0, n_zero = 0, n_acc = 0;
    int f;
    bit e;
    decide = 0; hdr_valid = 0; idle_avail = 0; hdr_bitmap = 0; stitch = 0; depart = 0;
    stitch_port = 0; depart_port = 0;
    foreach (ml[p]) ml[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) check(len[p] == ml[p], "length");
      check(drop_cnt == drops, "drop counter");
      decide = 0; stitch = 0; depart = 0;
      case (i % 3)
        0: begin
          decide = 1;
          hdr_valid = $urandom_range(0, 7) != 0;
          case ($urandom_range(0, 5))
            0: hdr_bitmap = 0;
            1: hdr_bitmap = NP'($urandom);
            default: hdr_bitmap = NP'(1) << $urandom_range(0, 3);
          endcase
          idle_avail = $urandom_range(0, 9) != 0;
          f = -1;
          for (int b = NP - 1; b >= 0; b--) if (hdr_bitmap[b]) f = b;
          e = hdr_valid && f >= 0 && idle_avail && ml[f] < QL;
          #1;
          if (f >= 0) check(dest_port == 4'(f), "first leaf");
          check(accept == e, "admission");
          check(arr_valid == e && (!e || arr_port == 4'(f)), "arrival event");
          check(drop == (hdr_valid && !e), "drop pulse");
          if (hdr_valid && !e) begin
            drops++;
            if (f < 0) n_zero++;
            else if (!idle_avail) n_full++;
            else n_lim++;
          end
          if (e) begin ml[f]++; n_acc++; end
        end
        1: begin
          stitch = $urandom_range(0, 1);
          stitch_port = 4'($urandom_range(0, 3));
          #1;
          check(st_valid == stitch && st_port == stitch_port, "stitch event");
          if (stitch) ml[stitch_port]++;
        end
        default: begin
          depart_port = 4'($urandom_range(0, 3));
          depart = (ml[depart_port] > 0) && $urandom_range(0, 1);
          if (depart) ml[depart_port]--;
        end
      endcase
    end
    check(n_lim > 0 && n_full > 0 && n_zero > 0 && n_acc > 0, "every admission rule used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

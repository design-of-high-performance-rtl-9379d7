// ocr_tb: checks the outgoing cell reader. The bench stands in for the read
// pointer manager (it answers a grant with a head address from phase 1 on)
// and for the cell buffer memory (a model preloaded with a known pattern).
// Checked: the grant reaches the RPM on phase 0 only, the departure goes to
// the policing module on phase 1, the six beat reads on phases 1-6 at
// {address, beat}, and the cell on the output on phases 2-7 with the start
// marker on the first beat and the granted port.
module ocr_tb;
  localparam int NP = 16, AW = 5, NB = 6, SLOT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase, sel_port, rpm_grant_port, rpm_port, depart_port, out_port;
  logic sel_valid, rpm_grant_valid, rpm_valid, depart, bm_rd_en, out_valid, out_sop;
  logic [AW-1:0] rpm_addr;
  logic [AW+2:0] bm_rd_addr;
  logic [71:0] bm_rd_data, out_data;

  ocr #(.N_PORTS(NP), .CELL_AW(AW)) dut (.*);
  sram_model #(.AW(AW+3), .DW(72)) u_mem (
    .clk, .wr_en(1'b0), .wr_addr('0), .wr_data('0),
    .rd_en(bm_rd_en), .rd_addr(bm_rd_addr), .rd_data(bm_rd_data));

  function automatic logic [71:0] pat(int a, int b);
    return {8'(b), 32'(a), 32'(a * 7 + b * 13)};
  endfunction

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
    int n_cells = 0;
    bit gv;
    int gp, ga;
    for (int a = 0; a < (1 << AW); a++)
      for (int b = 0; b < 8; b++) u_mem.mem[{a[AW-1:0], 3'(b)}] = pat(a, b);
    phase = 0; sel_valid = 0; sel_port = 0; rpm_valid = 0; rpm_addr = 0; rpm_port = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      gv = $urandom_range(0, 3) != 0;
      gp = $urandom_range(0, NP - 1);
      ga = $urandom_range(0, (1 << AW) - 1);
      for (int ph = 0; ph < SLOT; ph++) begin
        @(negedge clk);
        phase = 4'(ph);
        sel_valid = gv && (ph == 0 || $urandom_range(0, 1));
        sel_port  = 4'(gp);
        if (ph == 1) begin rpm_valid = gv; rpm_addr = AW'(ga); rpm_port = 4'(gp); end
        #1;
        check(rpm_grant_valid == (ph == 0 && gv), "grant to RPM on phase 0");
        if (ph == 0 && gv) check(rpm_grant_port == 4'(gp), "granted port to RPM");
        check(depart == (ph == 1 && gv), "departure on phase 1");
        if (depart) check(depart_port == 4'(gp), "departure port");
        check(bm_rd_en == (gv && ph >= 1 && ph <= NB), $sformatf("read enable at phase %0d", ph));
        if (bm_rd_en) check(bm_rd_addr == {AW'(ga), 3'(ph - 1)}, "read address");
        if (gv && ph >= 2 && ph < 2 + NB) begin
          check(out_valid && out_sop == (ph == 2) && out_port == 4'(gp), "output framing");
          check(out_data == pat(ga, ph - 2), $sformatf("beat %0d", ph - 2));
        end else check(!out_valid, "no output");
      end
      if (gv) n_cells++;
    end
    check(n_cells > 0, "cells read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

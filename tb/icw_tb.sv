// icw_tb: checks the incoming cell writer.
// Cells of 6 beats are sent at random slots; the bench checks the header
// presented in the following slot (valid flag and destination bitmap), and
// that an accepted cell is written beat by beat at {address, beat} on phases
// 0-5 of that slot with the data it arrived with, while a refused cell
// writes nothing.
module icw_tb;
  localparam int NP = 16, AW = 5, NB = 6, SLOT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] phase;
  logic in_valid, hdr_valid, accept, bm_wr_en;
  logic [71:0] in_data, bm_wr_data;
  logic [NP-1:0] hdr_bitmap;
  logic [AW-1:0] wr_cell;
  logic [AW+2:0] bm_wr_addr;

  icw #(.N_PORTS(NP), .CELL_AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [NB-1:0][71:0] prev_cell;
  bit prev_v;

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
    int n_acc = 0, n_ref = 0;
    logic [NB-1:0][71:0] cbeats;
    bit send, acc;
    phase = 0; in_valid = 0; in_data = 0; accept = 0; wr_cell = 0; prev_v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      send = $urandom_range(0, 3) != 0;
      for (int b = 0; b < NB; b++) cbeats[b] = {$urandom, $urandom, $urandom};
      acc = $urandom_range(0, 3) != 0;
      wr_cell = AW'($urandom);
      for (int ph = 0; ph < SLOT; ph++) begin
        @(negedge clk);
        phase    = 4'(ph);
        in_valid = send && ph < NB;
        in_data  = cbeats[ph < NB ? ph : 0];
        accept   = (ph == 0) && acc;
        #1;
        if (ph == 0) begin
          check(hdr_valid == prev_v, "header valid");
          if (prev_v) check(hdr_bitmap == prev_cell[0][71 -: NP], "header bitmap");
          if (prev_v) begin if (acc) n_acc++; else n_ref++; end
        end
        if (ph < NB && prev_v && acc) begin
          check(bm_wr_en, $sformatf("write at phase %0d", ph));
          check(bm_wr_addr == {wr_cell, 3'(ph)}, "write address");
          check(bm_wr_data == prev_cell[ph], "write data");
        end else begin
          check(!bm_wr_en, $sformatf("no write at phase %0d", ph));
        end
      end
      prev_v = send;
      prev_cell = cbeats;
    end
    check(n_acc > 0 && n_ref > 0, "accepted and refused cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

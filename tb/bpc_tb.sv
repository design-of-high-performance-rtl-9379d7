// bpc_tb: checks that the backpressure controller sums, per VOQ, the arrival
// and stitch events of each slot and presents the sums at the slot end,
// starting again from zero for the next slot.
module bpc_tb;
  localparam int NP = 16, SLOT = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_end, arr_valid, st_valid;
  logic [3:0] arr_port, st_port;
  logic [NP-1:0][1:0] inc;

  bpc #(.N_PORTS(NP)) dut (.*);

  int checks = 0, failures = 0;
  int exp_cnt[NP];

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
    int n_two = 0;
    slot_end = 0; arr_valid = 0; st_valid = 0; arr_port = 0; st_port = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 500; s++) begin
      foreach (exp_cnt[p]) exp_cnt[p] = 0;
      for (int ph = 0; ph < SLOT; ph++) begin
        @(negedge clk);
        slot_end = (ph == SLOT - 1);
        arr_valid = (ph == 0) && $urandom_range(0, 1);
        arr_port  = 4'($urandom_range(0, 3));
        st_valid  = (ph == 2) && $urandom_range(0, 1);
        st_port   = 4'($urandom_range(0, 3));
        if (arr_valid) exp_cnt[arr_port]++;
        if (st_valid) exp_cnt[st_port]++;
        if (slot_end) begin
          for (int p = 0; p < NP; p++) begin
            check(inc[p] == 2'(exp_cnt[p]), $sformatf("inc[%0d]=%0d expected %0d", p, inc[p], exp_cnt[p]));
            if (exp_cnt[p] == 2) n_two++;
          end
        end
      end
    end
    check(n_two > 0, "two events on one VOQ in a slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

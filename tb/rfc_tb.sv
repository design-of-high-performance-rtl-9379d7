// rfc_tb: checks the request FIFO controller against a model written in
// terms of request ages: each outstanding request of a VOQ has an age in
// slots; a grant removes the oldest; a request that reaches the round-trip
// depth without a grant is sent again (age 0); otherwise a VOQ with waiting
// cells sends a new request. Random cell counts and random grants, some for
// ports with nothing outstanding (must be flagged and not passed on), are
// applied once per slot; requests, passed-on grants, the spurious flag and
// the waiting-cell counts are compared every slot.
module rfc_tb;
  localparam int NP = 16, AW = 10, D = 4, SLOT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_end, arb_grant_valid, ocr_grant_valid, spurious;
  logic [NP-1:0][1:0] inc;
  logic [3:0] arb_grant_port, ocr_grant_port;
  logic [NP-1:0] arb_req;
  logic [NP-1:0][AW:0] len;
  logic [NP-1:0][D-1:0] fifo;

  rfc #(.N_PORTS(NP), .CELL_AW(AW), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  int ages[NP][$];
  int pending[NP];

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
    int n_resent = 0, n_new = 0, n_spur = 0, n_grant = 0, n_invalid = 0;
    logic [NP-1:0] exp_req;
    bit exp_gv, hit;
    int gp;
    slot_end = 0; inc = '0; arb_grant_valid = 0; arb_grant_port = 0;
    foreach (pending[p]) pending[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 1500; s++) begin
      for (int ph = 0; ph < SLOT - 1; ph++) @(negedge clk);
      // slot end clock
      slot_end = 1;
      for (int p = 0; p < NP; p++) begin
        inc[p] = (p < 6 && $urandom_range(0, 3) == 0) ? 2'($urandom_range(1, 2)) : 2'd0;
        pending[p] += inc[p];
      end
      arb_grant_valid = $urandom_range(0, 2) != 0;
      gp = $urandom_range(0, 7);
      arb_grant_port = 4'(gp);
      hit = 0;
      if (arb_grant_valid && ages[gp].size() > 0) begin
        int oldest_i, oldest_a;
        oldest_i = 0; oldest_a = -1;
        foreach (ages[gp][i]) if (ages[gp][i] > oldest_a) begin oldest_a = ages[gp][i]; oldest_i = i; end
        ages[gp].delete(oldest_i);
        hit = 1;
        n_grant++;
      end
      #1;
      check(spurious == (arb_grant_valid && !hit), "spurious grant flag");
      if (arb_grant_valid && !hit) n_spur++;
      exp_gv = arb_grant_valid && hit;
      for (int p = 0; p < NP; p++) begin
        bit resend;
        resend = 0;
        foreach (ages[p][i]) begin
          if (ages[p][i] == D - 1) begin ages[p][i] = 0; resend = 1; end
          else ages[p][i]++;
        end
        exp_req[p] = resend;
        if (resend) n_resent++;
        else if (pending[p] > 0) begin
          pending[p]--;
          ages[p].push_back(0);
          exp_req[p] = 1;
          n_new++;
        end else n_invalid++;
      end
      @(negedge clk);
      slot_end = 0; inc = '0; arb_grant_valid = 0;
      check(arb_req == exp_req, $sformatf("requests %h expected %h", arb_req, exp_req));
      check(ocr_grant_valid == exp_gv, "grant passed on");
      if (exp_gv) check(ocr_grant_port == 4'(gp), "granted port passed on");
      for (int p = 0; p < NP; p++) check(len[p] == pending[p], "waiting cells");
    end
    check(n_resent > 0 && n_new > 0 && n_spur > 0 && n_grant > 0 && n_invalid > 0,
          "re-sent, new, invalid requests, grants and spurious grants all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

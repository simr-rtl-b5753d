// tb_l1_xbar: self-checking test of the lane-to-bank crossbar.
//
// Eight lane ports hold random requests until granted while the banks are
// randomly ready. Every cycle the testbench checks that a bank forwards a
// request that really addresses it, that only forwarded-and-ready requests
// are granted, that a bank with a requester is never idle, and (round-robin)
// that no port waits more than NPORTS cycles of bank readiness. All-to-one-
// bank traffic checks that conflicts serialise at one access per cycle. The
// return network is checked for routing and one answer per port.
module tb_l1_xbar;
  localparam int NP = 8, NB = 8, AW = 48, PW = 8, RW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0] req_valid, req_grant, out_valid;
  logic [NP-1:0][AW-1:0] req_addr;
  logic [NP-1:0][PW-1:0] req_pay;
  logic [NB-1:0] bank_valid, bank_ready, rsp_valid, rsp_ready;
  logic [NB-1:0][AW-1:0] bank_addr;
  logic [NB-1:0][PW-1:0] bank_pay;
  logic [NB-1:0][2:0] bank_src, rsp_dst;
  logic [NB-1:0][RW-1:0] rsp_data;
  logic [NP-1:0][RW-1:0] out_data;
  logic [3:0] conflicts;

  l1_xbar #(.NPORTS(NP), .NBANKS(NB), .AW(AW), .PW(PW), .RSPW(RW), .LINE_OFF_W(5)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int wait_cnt[NP];
  int grants, hot_cycles;
  bit hot;
  logic [NP-1:0] g;

  task automatic new_req(input int p);
    req_valid[p] = 1'($urandom_range(0, 3) != 0);
    req_addr[p]  = hot ? {16'h0, 32'($urandom)} & ~48'hE0 | 48'h60   // all to bank 3
                       : {16'h0, 32'($urandom)};
    req_pay[p]   = PW'(p * 16 + $urandom_range(0, 15));
  endtask

  initial begin
    req_valid = '0; req_addr = '0; req_pay = '0; bank_ready = '0;
    rsp_valid = '0; rsp_dst = '0; rsp_data = '0; hot = 0; grants = 0; hot_cycles = 0;
    for (int p = 0; p < NP; p++) wait_cnt[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) new_req(p);
    for (int c = 0; c < 3000; c++) begin
      if (c == 2000) begin hot = 1; for (int p = 0; p < NP; p++) begin new_req(p); wait_cnt[p] = 0; end end
      bank_ready = hot ? '1 : NB'($urandom) | NB'($urandom);
      rsp_valid  = NB'($urandom);
      for (int b = 0; b < NB; b++) begin rsp_dst[b] = 3'($urandom); rsp_data[b] = RW'($urandom); end
      #1;
      // request network
      for (int b = 0; b < NB; b++) begin
        bit any;
        any = 0;
        for (int p = 0; p < NP; p++) if (req_valid[p] && req_addr[p][7:5] == 3'(b)) any = 1;
        check(bank_valid[b] == any, "bank busy iff some port addresses it");
        if (bank_valid[b]) begin
          check(req_valid[bank_src[b]] && req_addr[bank_src[b]][7:5] == 3'(b) &&
                bank_addr[b] == req_addr[bank_src[b]] && bank_pay[b] == req_pay[bank_src[b]],
                "forwarded request belongs to the bank");
        end
      end
      for (int p = 0; p < NP; p++) begin
        int b;
        b = int'(req_addr[p][7:5]);
        check(req_grant[p] == (req_valid[p] && bank_valid[b] && int'(bank_src[b]) == p && bank_ready[b]),
              "grant only for the forwarded request of a ready bank");
      end
      // return network
      for (int p = 0; p < NP; p++) begin
        int first;
        first = -1;
        for (int b = 0; b < NB; b++) if (rsp_valid[b] && int'(rsp_dst[b]) == p && first < 0) first = b;
        check(out_valid[p] == (first >= 0), "answer reaches its port");
        if (first >= 0) check(out_data[p] == rsp_data[first] && rsp_ready[first], "lowest bank wins the port");
      end
      for (int b = 0; b < NB; b++)
        if (rsp_valid[b] && rsp_ready[b]) check(out_valid[rsp_dst[b]] && out_data[rsp_dst[b]] == rsp_data[b], "accepted answer delivered");
      if (hot) begin hot_cycles++; check($countones(req_grant) <= 1, "one access per cycle to a hot bank"); end
      g = req_grant;          // sampled before the edge moves the pointers
      @(posedge clk); #1;
      for (int p = 0; p < NP; p++) begin
        int b;
        b = int'(req_addr[p][7:5]);
        if (req_valid[p] && !g[p] && bank_ready[b]) wait_cnt[p]++;
        if (g[p] || !req_valid[p]) begin
          check(wait_cnt[p] <= NP, $sformatf("round-robin bounds the wait p%0d w%0d b%0d ready%b", p, wait_cnt[p], b, bank_ready));
          wait_cnt[p] = 0;
          if (g[p]) grants++;
          new_req(p);
        end
      end
    end
    check(grants > 3000, "traffic flowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

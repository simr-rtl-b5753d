// tb_tlb_bank: self-checking test of one DTLB bank.
//
// Fills random translations, looks pages up and compares with a reference
// associative array holding the last ENTRIES distinct pages filled (the
// bank replaces round-robin), then checks refill of a present page,
// per-page invalidation (directed and random) and flush.
module tb_tlb_bank;
  localparam int E = 32, VW = 36, PW = 36;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [VW-1:0] lk_vpn, fill_vpn, inv_vpn;
  logic [PW-1:0] lk_ppn, fill_ppn;
  logic          lk_hit, fill_valid, inv_valid, flush;

  tlb_bank #(.ENTRIES(E), .VPN_W(VW), .PPN_W(PW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [PW-1:0] ref_map[logic [VW-1:0]];
  logic [VW-1:0] order[$];    // fill order = replacement order

  task automatic fill(input logic [VW-1:0] v, input logic [PW-1:0] p);
    fill_valid = 1; fill_vpn = v; fill_ppn = p;
    @(posedge clk); #1; fill_valid = 0;
    if (!ref_map.exists(v)) begin
      if (order.size() == E) ref_map.delete(order.pop_front());
      order.push_back(v);
    end
    ref_map[v] = p;
  endtask

  task automatic look(input logic [VW-1:0] v);
    lk_vpn = v; #1;
    check(lk_hit == ref_map.exists(v), $sformatf("hit for vpn %h", v));
    if (lk_hit && ref_map.exists(v)) check(lk_ppn == ref_map[v], "translation");
  endtask

  initial begin
    fill_valid = 0; inv_valid = 0; flush = 0; lk_vpn = '0; fill_vpn = '0; fill_ppn = '0; inv_vpn = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    look(36'h123);
    for (int n = 0; n < 400; n++) begin
      fill(36'($urandom_range(0, 60)), 36'($urandom));
      for (int k = 0; k < 4; k++) look(36'($urandom_range(0, 63)));
    end
    // invalidate one present page
    inv_vpn = order[3]; inv_valid = 1; @(posedge clk); #1; inv_valid = 0;
    ref_map.delete(inv_vpn);
    look(inv_vpn);
    check(!lk_hit, "invalidated page misses");
    look(order[4]);
    check(lk_hit, "other pages survive invalidation");
    // random invalidations (present or absent pages), no further fills
    for (int n = 0; n < 60; n++) begin
      inv_vpn = 36'($urandom_range(0, 63)); inv_valid = 1; @(posedge clk); #1; inv_valid = 0;
      if (ref_map.exists(inv_vpn)) ref_map.delete(inv_vpn);
      for (int k = 0; k < 64; k++) look(36'(k));
    end
    flush = 1; @(posedge clk); #1; flush = 0;
    for (int k = 0; k < 64; k++) begin lk_vpn = 36'(k); #1; check(!lk_hit, "flushed"); end
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

// tlb_bank: one bank of the banked data TLB of the RPU.
//
// Each L1 data bank has its own TLB bank so that translation keeps up with the
// L1 throughput. Because data is interleaved over the banks at line
// granularity, much finer than a page, the same translation may be present in
// several banks; a per-entry invalidation is therefore broadcast to every
// bank. This bank is fully associative with ENTRIES entries (a 256-entry DTLB
// as 8 banks of 32).
//
// Interface: lookup is combinational (lk_vpn -> lk_hit, lk_ppn). A fill writes
// the translation into the entry that already holds the page, otherwise into
// the next entry of a round-robin victim pointer. inv_valid removes the entry
// of one page, flush removes all. Fills, invalidations and flushes take effect
// at the clock edge. Full associativity and round-robin replacement are this
// design's choices.
module tlb_bank #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned VPN_W   = 36,
  parameter int unsigned PPN_W   = 36
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VPN_W-1:0] lk_vpn,
  output logic             lk_hit,
  output logic [PPN_W-1:0] lk_ppn,
  input  logic             fill_valid,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn,
  input  logic             inv_valid,
  input  logic [VPN_W-1:0] inv_vpn,
  input  logic             flush
);

  localparam int unsigned EW = $clog2(ENTRIES);

  logic [ENTRIES-1:0]             v_q;
  logic [ENTRIES-1:0][VPN_W-1:0]  vpn_q;
  logic [ENTRIES-1:0][PPN_W-1:0]  ppn_q;
  logic [EW-1:0]                  victim_q;

  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (v_q[e] && vpn_q[e] == lk_vpn) begin
        lk_hit = 1'b1;
        lk_ppn = ppn_q[e];
      end
  end

  logic          fill_hit;
  logic [EW-1:0] fill_idx;
  always_comb begin
    fill_hit = 1'b0;
    fill_idx = victim_q;
    for (int e = 0; e < ENTRIES; e++)
      if (v_q[e] && vpn_q[e] == fill_vpn) begin
        fill_hit = 1'b1;
        fill_idx = EW'(e);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q      <= '0;
      victim_q <= '0;
    end else begin
      if (inv_valid)
        for (int e = 0; e < ENTRIES; e++)
          if (vpn_q[e] == inv_vpn) v_q[e] <= 1'b0;
      if (fill_valid) begin
        v_q[fill_idx]   <= 1'b1;
        vpn_q[fill_idx] <= fill_vpn;
        ppn_q[fill_idx] <= fill_ppn;
        if (!fill_hit) victim_q <= EW'(victim_q + 1'b1);
      end
      if (flush) v_q <= '0;
    end
  end

endmodule

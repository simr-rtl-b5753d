// tb_store_queue: self-checking test of the lane-wide store queue.
//
// Allocates rows shaped like coalescing-unit output (uniform, consecutive and
// divergent stores under random lane masks) into a small address pool,
// commits them in order at random times, and grants random subsets of the
// drain requests. Every cycle a random per-lane forwarding lookup is compared
// with a reference queue kept here (youngest matching store of the same lane
// wins; coalesced rows answer through slot 0). It also checks that nothing
// drains before commit, that a coalesced row drains as one line write, and at
// the end that the memory image built from the drain writes equals the image
// obtained by applying every store in program order.
module tb_store_queue;
  import rpu_pkg::*;
  localparam int L = 8, AW = 48, DW = 32, ROWS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 alloc_valid, alloc_ready, commit_valid;
  mcu_mode_e            alloc_mode;
  logic [L-1:0]         alloc_lane_mask, alloc_slot_mask, q_mask, q_hit, drain_valid, drain_grant;
  logic [L-1:0][AW-1:0] alloc_addr, q_addr, drain_addr;
  logic [L-1:0][DW-1:0] alloc_data, q_data;
  logic [L-1:0][255:0]  drain_wdata;
  logic [L-1:0][7:0]    drain_wmask;
  logic [$clog2(ROWS+1)-1:0] count;

  store_queue #(.ROWS(ROWS), .LANES(L), .VA_W(AW), .DATA_W(DW), .LINE_BYTES(32)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference rows: per-lane effective address and data
  typedef struct { mcu_mode_e mode; logic [L-1:0] lm, pend; logic [L-1:0][AW-1:0] a; logic [L-1:0][DW-1:0] d; } row_t;
  row_t rq[$];
  int   ncommit;
  logic [DW-1:0] mem_dut[logic [AW-1:0]], mem_ref[logic [AW-1:0]];
  int   n_fwd, n_coal_drain, n_drain;

  localparam logic [AW-1:0] BASE = 48'h0000_0004_0000;

  task automatic make_row(output row_t r, output logic [L-1:0] sm, output logic [L-1:0][AW-1:0] slot);
    int f, la, k;
    r.lm = L'($urandom) | L'(1 << $urandom_range(0, L - 1));
    f = -1; la = 0;
    for (int l = 0; l < L; l++) if (r.lm[l]) begin if (f < 0) f = l; la = l; end
    for (int l = 0; l < L; l++) begin r.d[l] = $urandom; slot[l] = {16'hDEAD, 32'($urandom)}; end
    case ($urandom_range(0, 2))
      0: begin
        r.mode = MCU_UNIFORM;
        for (int l = 0; l < L; l++) r.a[l] = BASE + 48'($urandom_range(0, 31) * 4);
        for (int l = 0; l < L; l++) r.a[l] = r.a[0];
      end
      1: begin
        r.mode = MCU_CONSEC;
        k = $urandom_range(0, 7 - (la - f));
        for (int l = 0; l < L; l++) r.a[l] = BASE + 48'($urandom_range(0, 3) * 32 + (k + l - f) * 4);
        for (int l = 0; l < L; l++) r.a[l] = r.a[f] + 48'((l - f) * 4);
      end
      default: begin
        int perm[32];
        r.mode = MCU_DIVERGENT;
        for (int i = 0; i < 32; i++) perm[i] = i;
        perm.shuffle();
        for (int l = 0; l < L; l++) r.a[l] = BASE + 48'(perm[l] * 4);
      end
    endcase
    if (r.mode == MCU_DIVERGENT) begin
      sm = r.lm;
      for (int l = 0; l < L; l++) slot[l] = r.a[l];
    end else begin
      sm = L'(1);
      slot[0] = r.a[f];
    end
    r.pend = sm;
  endtask

  initial begin
    row_t nr; logic [L-1:0] sm; logic [L-1:0][AW-1:0] slot;
    logic [L-1:0] e_hit; logic [L-1:0][DW-1:0] e_data;
    bit do_alloc, do_commit;
    alloc_valid = 0; commit_valid = 0; q_mask = '0; q_addr = '0; drain_grant = '0;
    alloc_mode = MCU_NONE; alloc_lane_mask = '0; alloc_slot_mask = '0; alloc_addr = '0; alloc_data = '0;
    ncommit = 0; n_fwd = 0; n_coal_drain = 0; n_drain = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit fill_phase;
      fill_phase = (cyc % 1000) < 600;    // alternate filling up and draining
      // ---- stimulus ----
      make_row(nr, sm, slot);
      do_alloc  = $urandom_range(0, 2) != 0 && cyc < 5500 && (fill_phase || $urandom_range(0, 3) == 0);
      do_commit = ncommit < rq.size() && $urandom_range(0, fill_phase ? 4 : 1) == 0;
      alloc_valid = do_alloc; alloc_mode = nr.mode; alloc_lane_mask = nr.lm; alloc_slot_mask = sm;
      alloc_addr = slot; alloc_data = nr.d;
      commit_valid = do_commit;
      q_mask = L'($urandom);
      for (int l = 0; l < L; l++) q_addr[l] = BASE + 48'($urandom_range(0, 127) * 4) + 48'($urandom_range(0, 3));
      #1;
      drain_grant = drain_valid & L'($urandom);
      #1;
      // ---- checks against the reference ----
      check(int'(count) == rq.size(), "occupancy");
      check(alloc_ready == (rq.size() < ROWS), "alloc_ready when not full");
      e_hit = '0; e_data = '0;
      foreach (rq[i]) for (int l = 0; l < L; l++)
        if (q_mask[l] && rq[i].lm[l] && rq[i].a[l][AW-1:2] == q_addr[l][AW-1:2]) begin
          e_hit[l] = 1; e_data[l] = rq[i].d[l];
        end
      check(q_hit == e_hit, $sformatf("forward hit %b expected %b", q_hit, e_hit));
      for (int l = 0; l < L; l++) if (e_hit[l]) check(q_data[l] == e_data[l], "forwarded data of the youngest store");
      if (e_hit != '0) n_fwd++;
      check(drain_valid == ((ncommit > 0) ? rq[0].pend : '0), "drain only committed head row slots");
      if (drain_valid != '0 && rq[0].mode != MCU_DIVERGENT) begin
        check(drain_valid == L'(1), "coalesced row drains as a single write");
        n_coal_drain++;
      end
      // ---- apply granted drains to the memory image ----
      for (int s = 0; s < L; s++) if (drain_grant[s]) begin
        n_drain++;
        for (int w = 0; w < 8; w++) if (drain_wmask[s][w])
          mem_dut[{drain_addr[s][AW-1:5], 5'b0} + 48'(w * 4)] = drain_wdata[s][w*32 +: 32];
      end
      // ---- advance the reference at the edge ----
      if (ncommit > 0) begin
        rq[0].pend &= ~drain_grant;
        if (rq[0].pend == '0) begin void'(rq.pop_front()); ncommit--; end
      end
      if (do_commit) ncommit++;
      if (do_alloc && rq.size() < ROWS + (drain_grant != '0 ? 1 : 0) && alloc_ready) begin
        rq.push_back(nr);
        for (int l = 0; l < L; l++) if (nr.lm[l]) mem_ref[nr.a[l] & ~48'h3] = nr.d[l];
      end
      @(posedge clk); #1;
    end
    // commit and drain everything left
    alloc_valid = 0;
    while (rq.size() > 0) begin
      commit_valid = ncommit < rq.size();
      q_mask = '0;
      #1;
      drain_grant = drain_valid;
      #1;
      for (int s = 0; s < L; s++) if (drain_grant[s])
        for (int w = 0; w < 8; w++) if (drain_wmask[s][w])
          mem_dut[{drain_addr[s][AW-1:5], 5'b0} + 48'(w * 4)] = drain_wdata[s][w*32 +: 32];
      if (ncommit > 0) begin
        rq[0].pend &= ~drain_grant;
        if (rq[0].pend == '0) begin void'(rq.pop_front()); ncommit--; end
      end
      if (commit_valid) ncommit++;
      @(posedge clk); #1;
    end
    commit_valid = 0;
    check(count == 0, "queue empty at the end");
    foreach (mem_ref[a]) check(mem_dut.exists(a) && mem_dut[a] == mem_ref[a], $sformatf("memory word %h", a));
    check(mem_dut.size() == mem_ref.size(), "no stray writes");
    check(n_fwd > 500 && n_coal_drain > 100 && n_drain > 1000, "forwarding and both drain forms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

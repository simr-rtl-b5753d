// tb_load_queue: self-checking test of the lane-wide load queue.
//
// Allocates rows with random slot masks (coalesced rows use slot 0 only),
// some slots already satisfied by forwarding, grants random subsets of the
// offered slots, and returns data per lane after random delays in any order.
// A reference model kept here checks every cycle: lowest free row for
// allocation, the oldest row with unsent slots offered for issue with the
// right slot addresses, the lowest complete row reported with its tag, and
// the occupancy. Every allocated row must complete exactly once. A short
// full-queue phase checks back-pressure at 128 rows.
module tb_load_queue;
  import rpu_pkg::*;
  localparam int L = 8, AW = 48, ROWS = 128, TW = 8, RW = $clog2(ROWS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 alloc_valid, alloc_ready, done_valid;
  logic [RW-1:0]        alloc_row, iss_row, done_row;
  mcu_mode_e            alloc_mode, done_mode;
  logic [L-1:0]         alloc_lane_mask, alloc_slot_mask, alloc_done_mask, iss_valid, iss_grant,
                        fill_valid, done_lane_mask;
  logic [L-1:0][AW-1:0] alloc_addr, iss_addr;
  logic [TW-1:0]        alloc_tag, done_tag;
  logic [L-1:0][RW-1:0] fill_row;
  logic [$clog2(ROWS+1)-1:0] count;

  load_queue #(.ROWS(ROWS), .LANES(L), .VA_W(AW), .TAG_W(TW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference
  bit           used[ROWS];
  logic [L-1:0] need[ROWS], sent[ROWS], got[ROWS];
  logic [L-1:0][AW-1:0] addr[ROWS];
  logic [TW-1:0] tag[ROWS];
  int           age[ROWS];
  int           seq, n_alloc, n_done, n_fwd_slots, n_full;
  // outstanding memory answers: row/lane and the cycle they may return
  typedef struct { int row; int lane; int due; } pend_t;
  pend_t pend[$];

  initial begin
    int cyc; int e_alloc, e_iss, e_done; logic [L-1:0] e_iv;
    bit do_alloc; logic [L-1:0] lm, sm, dm;
    alloc_valid = 0; alloc_mode = MCU_NONE; alloc_lane_mask = '0; alloc_slot_mask = '0;
    alloc_done_mask = '0; alloc_addr = '0; alloc_tag = '0; iss_grant = '0;
    fill_valid = '0; fill_row = '0;
    seq = 0; n_alloc = 0; n_done = 0; n_fwd_slots = 0; n_full = 0;
    for (int r = 0; r < ROWS; r++) begin used[r] = 0; need[r] = '0; sent[r] = '0; got[r] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (cyc = 0; cyc < 8000; cyc++) begin
      bit slow;
      slow = (cyc % 2000) >= 1000 && (cyc % 2000) < 1600;   // memory stalls: queue fills up
      // ---- stimulus ----
      lm = L'($urandom) | L'(1 << $urandom_range(0, L - 1));
      if ($urandom_range(0, 1)) begin
        alloc_mode = $urandom_range(0, 1) ? MCU_UNIFORM : MCU_CONSEC; sm = L'(1);
      end else begin
        alloc_mode = MCU_DIVERGENT; sm = lm;
      end
      dm = sm & ($urandom_range(0, 3) == 0 ? L'($urandom) : '0);
      do_alloc = $urandom_range(0, 1) && cyc < 7600;
      alloc_valid = do_alloc; alloc_lane_mask = lm; alloc_slot_mask = sm; alloc_done_mask = dm;
      for (int l = 0; l < L; l++) alloc_addr[l] = {16'h0, 32'($urandom)};
      alloc_tag = TW'($urandom);
      iss_grant = slow ? L'($urandom) & L'($urandom) & L'($urandom) : L'($urandom) | L'($urandom);
      fill_valid = '0;
      for (int l = 0; l < L; l++)
        foreach (pend[i]) if (pend[i].lane == l && pend[i].due <= cyc) begin
          fill_valid[l] = 1; fill_row[l] = RW'(pend[i].row); pend.delete(i); break;
        end
      #1;
      // ---- reference outputs ----
      e_alloc = -1; e_iss = -1; e_done = -1;
      for (int r = ROWS - 1; r >= 0; r--) if (!used[r]) e_alloc = r;
      for (int r = ROWS - 1; r >= 0; r--) if (used[r] && (need[r] & ~got[r]) == '0) e_done = r;
      for (int r = 0; r < ROWS; r++)
        if (used[r] && (need[r] & ~sent[r]) != '0 && (e_iss < 0 || age[r] < age[e_iss])) e_iss = r;
      check(alloc_ready == (e_alloc >= 0), "alloc_ready");
      if (e_alloc >= 0) check(int'(alloc_row) == e_alloc, "lowest free row allocated");
      else n_full++;
      check(done_valid == (e_done >= 0), "completion valid");
      if (e_done >= 0)
        check(int'(done_row) == e_done && done_tag == tag[e_done], "lowest complete row and its tag");
      e_iv = (e_iss >= 0) ? need[e_iss] & ~sent[e_iss] : '0;
      check(iss_valid == e_iv, $sformatf("issue slots %b expected %b", iss_valid, e_iv));
      if (e_iss >= 0) begin
        check(int'(iss_row) == e_iss, "oldest row issues first");
        for (int l = 0; l < L; l++) if (e_iv[l]) check(iss_addr[l] == addr[e_iss][l], "slot address");
      end
      check(int'(count) == n_alloc - n_done, "occupancy");
      // ---- reference update at the edge ----
      // follow what was really offered, so that answers always match a sent slot
      for (int l = 0; l < L; l++) if (iss_valid[l] && iss_grant[l]) begin
        sent[iss_row][l] = 1;
        pend.push_back('{row: int'(iss_row), lane: l, due: cyc + (slow ? $urandom_range(20, 200) : $urandom_range(1, 12))});
      end
      for (int l = 0; l < L; l++) if (fill_valid[l]) got[fill_row[l]][l] = 1;
      if (e_done >= 0) begin used[e_done] = 0; n_done++; end
      if (do_alloc && e_alloc >= 0) begin
        used[e_alloc] = 1; need[e_alloc] = sm; sent[e_alloc] = dm; got[e_alloc] = dm;
        addr[e_alloc] = alloc_addr; tag[e_alloc] = alloc_tag; age[e_alloc] = seq++;
        n_alloc++; n_fwd_slots += $countones(dm);
      end
      @(posedge clk); #1;
    end
    alloc_valid = 0; fill_valid = '0;
    // drain: grant everything, return everything
    for (int k = 0; k < 3000 && n_done < n_alloc; k++) begin
      iss_grant = '1;
      fill_valid = '0;
      for (int l = 0; l < L; l++)
        foreach (pend[i]) if (pend[i].lane == l) begin
          fill_valid[l] = 1; fill_row[l] = RW'(pend[i].row); pend.delete(i); break;
        end
      #1;
      for (int l = 0; l < L; l++) if (iss_valid[l]) pend.push_back('{row: int'(iss_row), lane: l, due: 0});
      for (int l = 0; l < L; l++) if (fill_valid[l]) got[fill_row[l]][l] = 1;
      if (done_valid) begin
        check(used[done_row] && (need[done_row] & ~got[done_row]) == '0, "drain: completed row");
        used[done_row] = 0; n_done++;
      end
      @(posedge clk); #1;
    end
    check(n_done == n_alloc && count == 0, "every row completed exactly once");
    check(n_full > 50 && n_fwd_slots > 100, "full queue and forwarded slots exercised");
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

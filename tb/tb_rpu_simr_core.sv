// tb_rpu_simr_core: end-to-end test of one RPU core's SIMT additions at the
// full evaluated size (no parameter overrides on the core).
//
// Memory side: a stream of batch-wide (32-thread) memory instructions is
// sent on mi_*: stack stores/loads (interleaved stack space, consecutive
// words after remapping), private consecutive and scattered heap
// stores/loads, uniform loads from a shared read-only area, uniform stores,
// and cross-thread stack loads that must fault, under full and sparse active
// masks. The testbench keeps a program-order model of memory, so every load
// lane's value (forwarded from the store queue or read from an L1 line) is
// checked against it. Stores are committed in order once every older load has
// completed. A next-level model per bank answers line reads after a random
// delay and applies write-through stores; at the end its contents are
// compared with the model. TLB misses are refilled from a fixed page mapping
// after a delay, and pages are invalidated from time to time.
// Two directed parts measure access counts: an 8-byte stack push by all 32
// threads must cost 8 line writes, and after the random phase a batch of 8
// threads (stack region of 8 stacks) must cost one sub-batch per instruction.
//
// Control side (running at the same time): a batch is launched, diverges on
// an if/else, reconverges, calls a function on some threads (MinSP-PC picks
// the deeper stack first), spins on a lock with atomics until the deadlock
// escape switches paths, and partly exits; resolved branches go through the
// majority vote.
//
// Each mechanism is counted and the test fails if one never happened.
module tb_rpu_simr_core;
  import rpu_pkg::*;
  localparam int B = 32, L = 8, NB = 8, PC_W = 48, VA = 48, TW = 8;
  localparam int LQR = 128, LQW = $clog2(LQR);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------- DUT ----------------
  logic                  launch_valid, commit_valid, atomic_dec;
  logic [B-1:0]          launch_mask, commit_mask, commit_exit;
  logic [PC_W-1:0]       launch_pc;
  logic [B-1:0][PC_W-1:0] launch_sp, commit_pc, commit_sp;
  logic                  sel_valid, sel_switched;
  logic [PC_W-1:0]       sel_pc, sel_sp;
  logic [B-1:0]          sel_mask;
  logic                  br_valid, bp_valid, bp_taken;
  logic [B-1:0]          br_active, br_taken, bp_agree_mask;
  logic [B-1:0][PC_W-1:0] br_target;
  logic [PC_W-1:0]       bp_target;
  logic                  mi_valid, mi_ready, mi_store;
  logic [B-1:0]          mi_mask;
  logic [B-1:0][VA-1:0]  mi_addr;
  logic [B-1:0][31:0]    mi_data;
  logic [TW-1:0]         mi_tag;
  logic [VA-1:0]         ss0;
  logic [5:0]            stack_log2;
  logic [5:0]            batch_size;
  logic                  xstack_allow, stack_fault;
  logic [TW-1:0]         stack_fault_tag;
  logic                  st_commit_valid;
  logic                  ld_done_valid;
  logic [TW-1:0]         ld_done_tag;
  logic [1:0]            ld_done_sb;
  logic                  fwd_valid;
  logic [LQW-1:0]        fwd_row;
  logic [L-1:0]          fwd_mask;
  logic [L-1:0][31:0]    fwd_data;
  logic [L-1:0]          rsp_valid;
  logic [L-1:0][LQW-1:0] rsp_row;
  logic [L-1:0][255:0]   rsp_line;
  logic [NB-1:0]         tlb_miss;
  logic [NB-1:0][35:0]   tlb_miss_vpn;
  logic                  tlb_fill_valid, tlb_inv_valid, tlb_flush;
  logic [NB-1:0]         tlb_fill_banks;
  logic [35:0]           tlb_fill_vpn, tlb_fill_ppn, tlb_inv_vpn;
  logic [NB-1:0]         l2_req_valid, l2_req_ready, l2_req_we, l2_rsp_valid;
  logic [NB-1:0][47:0]   l2_req_addr;
  logic [NB-1:0][255:0]  l2_req_wdata, l2_rsp_data;
  logic [NB-1:0][7:0]    l2_req_wmask;

  rpu_simr_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- address map and page mapping ----------------
  localparam logic [VA-1:0] SS0    = 48'h0000_7000_0000;
  localparam logic [VA-1:0] SHARED = 48'h0000_1000_0000;
  localparam logic [VA-1:0] HEAPC  = 48'h0000_2000_0000;
  localparam logic [VA-1:0] HEAPD  = 48'h0000_3000_0000;
  localparam logic [VA-1:0] UREG   = 48'h0000_4000_0000;

  function automatic logic [35:0] ppn_of(input logic [35:0] vpn);
    return vpn ^ 36'h0_0AB0_0000;
  endfunction
  function automatic logic [47:0] pa_of(input logic [VA-1:0] va);
    return {ppn_of(va[47:12]), va[11:0]};
  endfunction
  function automatic logic [31:0] init_word(input logic [47:0] pa);
    return pa[31:0] ^ 32'hA5A5_0000 ^ 32'(pa >> 9);
  endfunction
  function automatic logic [VA-1:0] stack_map(input logic [VA-1:0] va);
    logic [VA-1:0] off, t, o;
    off = va - SS0;
    if (va < SS0 || off >= (48'(batch_size) << 12)) return va;
    t = off >> 12; o = off & 48'hFFF;
    return SS0 + ((o >> 2) * 48'(batch_size) + t) * 4 + (o & 3);
  endfunction

  // ---------------- next level (L2) model, one port per bank ----------------
  logic [31:0] l2mem[logic [47:0]];     // word-addressed by PA
  function automatic logic [31:0] l2_rd(input logic [47:0] pa);
    return l2mem.exists(pa) ? l2mem[pa] : init_word(pa);
  endfunction
  bit          l2_busy[NB];
  int          l2_dly[NB];
  logic [47:0] l2_a[NB];
  int          n_l2_rd, n_l2_wr;
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      l2_rsp_valid[b] <= 1'b0;
      if (l2_req_valid[b] && l2_req_ready[b]) begin
        check(l2_req_addr[b][7:5] == 3'(b), "next-level request comes from the bank owning the line");
        if (l2_req_we[b]) begin
          n_l2_wr++;
          for (int w = 0; w < 8; w++) if (l2_req_wmask[b][w])
            l2mem[{l2_req_addr[b][47:5], 5'b0} + 48'(4 * w)] = l2_req_wdata[b][32*w +: 32];
        end else begin
          n_l2_rd++;
          l2_busy[b] = 1; l2_a[b] = {l2_req_addr[b][47:5], 5'b0}; l2_dly[b] = $urandom_range(4, 20);
        end
      end else if (l2_busy[b]) begin
        if (l2_dly[b] == 0) begin
          for (int w = 0; w < 8; w++) l2_rsp_data[b][32*w +: 32] <= l2_rd(l2_a[b] + 48'(4 * w));
          l2_rsp_valid[b] <= 1'b1; l2_busy[b] = 0;
        end else l2_dly[b]--;
      end
      l2_req_ready[b] <= $urandom_range(0, 3) != 0;
    end
  end

  // ---------------- TLB refill and invalidation ----------------
  int  tlb_wait, n_tlb_miss_cyc, n_tlb_fill, n_tlb_inv;
  logic [35:0] last_vpn;
  always @(posedge clk) if (rst_n) begin
    #1;
    tlb_fill_valid = 0; tlb_inv_valid = 0; tlb_flush = 0;
    if (tlb_miss != '0) begin
      n_tlb_miss_cyc++;
      if (tlb_wait == 0) tlb_wait = $urandom_range(3, 8);
      else if (--tlb_wait == 0) begin
        for (int b = NB - 1; b >= 0; b--) if (tlb_miss[b]) tlb_fill_vpn = tlb_miss_vpn[b];
        tlb_fill_ppn   = ppn_of(tlb_fill_vpn);
        tlb_fill_banks = '0;
        for (int b = 0; b < NB; b++) if (tlb_miss[b] && tlb_miss_vpn[b] == tlb_fill_vpn) tlb_fill_banks[b] = 1;
        tlb_fill_valid = 1; n_tlb_fill++; last_vpn = tlb_fill_vpn;
      end
    end else if ($urandom_range(0, 299) == 0 && n_tlb_fill > 0) begin
      tlb_inv_valid = 1; tlb_inv_vpn = last_vpn; n_tlb_inv++;
    end
  end

  // ---------------- memory instructions ----------------
  typedef struct {
    bit st;
    logic [B-1:0] act;                 // active and not faulting
    logic [B-1:0][VA-1:0] m;           // remapped address per thread
    logic [B-1:0][31:0]   d;           // data stored / value expected
  } ins_t;
  ins_t ins[256];
  logic [31:0] model[logic [VA-1:0]];  // program-order memory, by remapped VA
  logic [VA-1:0] stored[$];
  function automatic logic [31:0] model_rd(input logic [VA-1:0] m);
    return model.exists(m) ? model[m] : init_word(pa_of(m));
  endfunction

  int n_ins, n_ld_ins, n_st_ins, n_sb_expected, n_skip, n_stack_lanes, n_fault_exp, n_fault;
  int n_sb_go;

  task automatic issue(input int kind, input logic [B-1:0] mask, input int off = -1);
    logic [B-1:0][VA-1:0] a; logic [B-1:0][31:0] d; logic [B-1:0] flt;
    int k, o; logic [TW-1:0] tg;
    k = $urandom_range(0, 15); o = (off >= 0) ? off : 4 * $urandom_range(0, 15);
    flt = '0;
    for (int t = 0; t < B; t++) begin
      d[t] = $urandom;
      case (kind)
        0, 1: a[t] = SS0 + 48'(t) * 48'h1000 + 48'h800 + 48'(o);
        2, 3: a[t] = HEAPC + 48'((k * B + t) * 4);
        4, 5: a[t] = HEAPD + 48'(t) * 48'h1000 + 48'(($urandom_range(0, 1) ? t * 32 : 0) + k * 4);
        6:    a[t] = SHARED + 48'(k * 4);
        7:    a[t] = UREG + 48'(k * 4);
        default: begin
          if (t % 2 == 0) begin a[t] = SS0 + 48'((t + 1) % B) * 48'h1000 + 48'h800 + 48'(o); flt[t] = 1; end
          else a[t] = SS0 + 48'(t) * 48'h1000 + 48'h800 + 48'(o);
        end
      endcase
    end
    if (kind == 7) for (int t = 1; t < B; t++) d[t] = d[0];
    tg = TW'(n_ins);
    ins[tg].st  = kind inside {0, 2, 4, 7};
    ins[tg].act = mask & ~flt;
    for (int t = 0; t < B; t++) ins[tg].m[t] = stack_map(a[t]);
    // program-order model
    for (int t = 0; t < B; t++) if (mask[t]) begin
      if (a[t] >= SS0 && a[t] < SS0 + (48'(batch_size) << 12)) n_stack_lanes++;
      if (flt[t]) n_fault_exp++;
    end
    for (int t = 0; t < B; t++) if (ins[tg].act[t]) begin
      if (ins[tg].st) begin model[ins[tg].m[t]] = d[t]; stored.push_back(ins[tg].m[t]); end
      else d[t] = model_rd(ins[tg].m[t]);
    end
    ins[tg].d = d;
    for (int s = 0; s < B / L; s++)
      if (mask[s*L +: L] != '0) n_sb_expected++; else n_skip++;
    // handshake
    mi_valid = 1; mi_store = ins[tg].st; mi_mask = mask; mi_addr = a; mi_data = d; mi_tag = tg;
    #1;
    while (!mi_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    mi_valid = 0;
    n_ins++;
    if (ins[tg].st) n_st_ins++; else n_ld_ins++;
  endtask

  // ---------------- load rows: allocation, data, completion ----------------
  bit            row_busy[LQR];
  logic [TW-1:0] row_tag[LQR];
  int            row_sb[LQR], row_seq[LQR];
  mcu_mode_e     row_mode[LQR];
  logic [L-1:0]  row_lm[LQR], row_have[LQR];
  int            ld_seq, ld_done_cnt, ld_done_prefix;
  bit            ld_done_by_seq[int];
  int            sq_alloc, sq_commit;
  int            sq_need[int];          // loads allocated before store row i
  int            n_mode[4], n_fwd, n_conflict, n_l1_hit, n_l1_miss, n_lane_checks;

  task automatic check_lane(input int r, input int l, input logic [31:0] v, input string src);
    int t; logic [31:0] e;
    t = row_sb[r] * L + l;
    e = ins[row_tag[r]].d[t];
    n_lane_checks++;
    check(v == e, $sformatf("%s: tag %0d thread %0d got %h expected %h", src, row_tag[r], t, v, e));
  endtask

  always @(posedge clk) if (rst_n) begin
    // sub-batches leaving the issue unit
    if (dut.sb_go) n_sb_go++;
    if (stack_fault) n_fault++;
    if (dut.x_conflicts != 0) n_conflict++;
    for (int b = 0; b < NB; b++) begin
      // bank events are sampled through the core's generate scope below
    end
    // MCU decisions
    if (dut.mc_valid) n_mode[int'(dut.mc_mode)]++;
    // store-row allocation
    if (dut.u_sq.alloc_valid && dut.u_sq.alloc_ready) begin
      sq_need[sq_alloc] = ld_seq;
      sq_alloc++;
    end
    // L1 answers towards the register file
    for (int p = 0; p < L; p++) if (rsp_valid[p]) begin
      int r; logic [VA-1:0] m;
      r = int'(rsp_row[p]);
      check(row_busy[r], "answer for an allocated load row");
      if (row_mode[r] == MCU_DIVERGENT) begin
        m = ins[row_tag[r]].m[row_sb[r] * L + p];
        check_lane(r, p, rsp_line[p][32 * m[4:2] +: 32], "divergent lane");
        row_have[r][p] = 1;
      end else begin
        check(p == 0, "coalesced row answered on port 0");
        for (int l = 0; l < L; l++) if (row_lm[r][l] && !row_have[r][l]) begin
          m = ins[row_tag[r]].m[row_sb[r] * L + l];
          check_lane(r, l, rsp_line[p][32 * m[4:2] +: 32], "coalesced lane");
          row_have[r][l] = 1;
        end
      end
    end
    // completion broadcast (lowest complete row)
    if (ld_done_valid) begin
      int r;
      r = int'(dut.done_row);
      check(row_busy[r] && ld_done_tag == row_tag[r] && int'(ld_done_sb) == row_sb[r],
            "completion tag and sub-batch");
      check(row_have[r] == row_lm[r], "every lane had its value before completion");
      row_busy[r] = 0; ld_done_cnt++;
      ld_done_by_seq[row_seq[r]] = 1;
      while (ld_done_by_seq.exists(ld_done_prefix)) ld_done_prefix++;
    end
    // load-row allocation, with store-to-load forwarding
    if (dut.u_lq.alloc_valid && dut.u_lq.alloc_ready) begin
      int r;
      r = int'(dut.lq_alloc_row);
      check(!row_busy[r], "load row reused only after completion");
      row_busy[r] = 1;
      row_tag[r]  = dut.mc_pay.tag;
      row_sb[r]   = int'(dut.mc_pay.sb);
      row_mode[r] = dut.mc_mode;
      row_lm[r]   = dut.mc_lmask;
      row_have[r] = '0;
      row_seq[r]  = ld_seq++;
      check(dut.mc_lmask == ins[row_tag[r]].act[row_sb[r] * L +: L], "row lane mask = active, non-faulting lanes");
      if (fwd_valid) begin
        check(int'(fwd_row) == r, "forwarded values go to the allocated row");
        n_fwd++;
        for (int l = 0; l < L; l++) if (fwd_mask[l]) begin
          check_lane(r, l, fwd_data[l], "forwarded lane");
          row_have[r][l] = 1;
        end
      end
    end
  end

  // L1 hit/miss events from every bank
  logic [NB-1:0] ev_hit_v, ev_miss_v;
  for (genvar b = 0; b < NB; b++) begin : g_ev
    assign ev_hit_v[b]  = dut.g_bank[b].ev_hit;
    assign ev_miss_v[b] = dut.g_bank[b].ev_miss;
  end
  always @(posedge clk) if (rst_n) begin
    n_l1_hit  += $countones(ev_hit_v);
    n_l1_miss += $countones(ev_miss_v);
  end

  // store commit: in order, once every older load has completed
  always @(posedge clk) if (rst_n) begin
    if (st_commit_valid) sq_commit++;
    #1;
    st_commit_valid = sq_commit < sq_alloc && ld_done_prefix >= sq_need[sq_commit] &&
                      $urandom_range(0, 1) == 1;
  end

  // ---------------- control side ----------------
  int n_diverge, n_reconv, n_minsp, n_switch, n_vote, n_vote_split, n_exit;

  task automatic ctl_idle();
    launch_valid = 0; commit_valid = 0; commit_mask = '0; commit_exit = '0; br_valid = 0;
  endtask
  task automatic ctl_move(input logic [B-1:0] m, input logic [PC_W-1:0] pc, input logic [PC_W-1:0] sp,
                          input logic [B-1:0] ex = '0);
    commit_valid = 1; commit_mask = m; commit_exit = ex;
    for (int i = 0; i < B; i++) if (m[i]) begin commit_pc[i] = pc; commit_sp[i] = sp; end
    @(posedge clk); #1; ctl_idle();
    @(posedge clk); #1;
  endtask
  task automatic ctl_vote(input logic [B-1:0] act, input logic [B-1:0] tk, input logic [PC_W-1:0] tgt);
    int nt, na;
    br_valid = 1; br_active = act; br_taken = tk;
    for (int i = 0; i < B; i++) br_target[i] = tgt;
    @(posedge clk); #1; br_valid = 0;
    nt = $countones(act & tk); na = $countones(act);
    check(bp_valid && bp_taken == (2 * nt > na), "batch branch outcome is the majority");
    check(bp_agree_mask == (bp_taken ? act & tk : act & ~tk), "agreeing threads");
    n_vote++;
    if (bp_agree_mask != act) n_vote_split++;
  endtask

  initial begin : control
    int sw;
    ctl_idle(); atomic_dec = 0; launch_mask = '0; launch_pc = '0; launch_sp = '0;
    commit_pc = '0; commit_sp = '0; br_active = '0; br_taken = '0; br_target = '0;
    wait (rst_n); @(posedge clk); #1;
    launch_valid = 1; launch_mask = '1; launch_pc = 48'h40_0000;
    for (int i = 0; i < B; i++) launch_sp[i] = 48'h7FFF_F000;
    @(posedge clk); #1; ctl_idle(); @(posedge clk); #1;
    check(sel_valid && sel_mask == '1 && sel_pc == 48'h40_0000, "launch selects the whole batch");
    for (int rep = 0; rep < 20; rep++) begin
      logic [B-1:0] tk;
      // if/else: per-thread outcome, majority reported to the predictor
      tk = $urandom;
      ctl_vote('1, tk, 48'h40_0100);
      ctl_move(tk, 48'h40_0100, 48'h7FFF_F000);
      ctl_move(~tk, 48'h40_0080, 48'h7FFF_F000);
      if (tk != '0 && tk != '1) begin
        check(sel_mask == ~tk && sel_pc == 48'h40_0080, "divergence: lowest-PC path first");
        n_diverge++;
      end
      ctl_move(~tk, 48'h40_0200, 48'h7FFF_F000);
      if (tk != '0 && tk != '1) check(sel_mask == tk && sel_pc == 48'h40_0100, "other path next");
      ctl_move(tk, 48'h40_0200, 48'h7FFF_F000);
      check(sel_mask == '1 && sel_pc == 48'h40_0200, "reconvergence");
      n_reconv++;
      // call on some threads: deeper stack wins despite the higher PC
      ctl_move(tk | 32'h1, 48'h50_0000, 48'h7FFF_EF00);
      check(sel_mask == (tk | 32'h1) && sel_sp == 48'h7FFF_EF00, "MinSP: deeper frame first");
      n_minsp++;
      ctl_move(tk | 32'h1, 48'h40_0200, 48'h7FFF_F000);
      check(sel_mask == '1 && sel_pc == 48'h40_0200, "return reconverges");
    end
    // lock: threads 0-15 spin with atomics while 16-31 wait further on
    ctl_move(32'hFFFF_0000, 48'h40_0300, 48'h7FFF_F000);
    sw = 0;
    for (int c = 0; c < 400; c++) begin
      logic [B-1:0] m;
      m = sel_mask;
      atomic_dec = !sel_switched;
      commit_valid = 1; commit_mask = m;
      for (int i = 0; i < B; i++) if (m[i]) begin commit_pc[i] = sel_pc; commit_sp[i] = 48'h7FFF_F000; end
      @(posedge clk); #1; ctl_idle(); atomic_dec = 0;
      if (sel_switched) begin
        sw++;
        check(sel_pc == 48'h40_0300, $sformatf("escape runs the waiting path (pc %h mask %h)", sel_pc, sel_mask));
      end
    end
    n_switch = sw;
    check(sw > 0, "deadlock escape");
    // threads exit
    ctl_move('1, 48'h40_0300, 48'h7FFF_F000, 32'h0000_FFFF);
    check(sel_mask == 32'hFFFF_0000, "exited threads leave the batch");
    n_exit++;
  end

  // ---------------- main sequence ----------------
  int st_rows_left, n_push_writes, n_b8_ins, n_b8_sb, n_cyc;
  always @(posedge clk) n_cyc++;
  initial begin
    mi_valid = 0; mi_store = 0; mi_mask = '0; mi_addr = '0; mi_data = '0; mi_tag = '0;
    ss0 = SS0; stack_log2 = 6'd12; batch_size = 6'(B); xstack_allow = 0; st_commit_valid = 0;
    tlb_fill_valid = 0; tlb_inv_valid = 0; tlb_flush = 0; tlb_fill_banks = '0;
    tlb_fill_vpn = '0; tlb_fill_ppn = '0; tlb_inv_vpn = '0;
    l2_req_ready = '1; l2_rsp_valid = '0; l2_rsp_data = '0; n_cyc = 0;
    tlb_wait = 0; n_tlb_miss_cyc = 0; n_tlb_fill = 0; n_tlb_inv = 0;
    n_l2_rd = 0; n_l2_wr = 0; n_ins = 0; n_ld_ins = 0; n_st_ins = 0; n_sb_expected = 0; n_skip = 0;
    n_stack_lanes = 0; n_fault_exp = 0; n_fault = 0; n_sb_go = 0;
    ld_seq = 0; ld_done_cnt = 0; ld_done_prefix = 0; sq_alloc = 0; sq_commit = 0;
    n_fwd = 0; n_conflict = 0; n_l1_hit = 0; n_l1_miss = 0; n_lane_checks = 0;
    n_mode = '{0, 0, 0, 0};
    for (int b = 0; b < NB; b++) begin l2_busy[b] = 0; l2_dly[b] = 0; end
    for (int r = 0; r < LQR; r++) row_busy[r] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // an 8-byte push by all 32 threads (two 4-byte words each) must cost
    // 8 line writes: 8 B x 32 threads / 32 B lines
    begin
      int w0;
      w0 = n_l2_wr;
      issue(0, '1, 16'h100);
      issue(0, '1, 16'h104);
      wait (sq_commit == sq_alloc && dut.sq_count == 0);
      repeat (30) @(posedge clk); #1;
      n_push_writes = n_l2_wr - w0;
      check(n_push_writes == 8, $sformatf("stack push of 8 bytes x 32 threads: %0d line writes, expected 8", n_push_writes));
    end
    for (int n = 0; n < 1200; n++) begin
      logic [B-1:0] mask;
      int kind;
      case ($urandom_range(0, 3))
        0, 1: mask = '1;
        2:    mask = B'($urandom);
        default: mask = B'($urandom) & 32'hFF00_00FF | B'(1 << $urandom_range(0, 31));
      endcase
      // store then load the same location class often, to exercise forwarding
      kind = $urandom_range(0, 8);
      issue(kind, mask);
      if (kind inside {0, 2, 4} && $urandom_range(0, 1)) issue(kind + 1, mask);
      if ($urandom_range(0, 7) == 0) begin repeat ($urandom_range(1, 30)) @(posedge clk); #1; end
    end
    // let everything complete and drain
    wait (ld_done_cnt == ld_seq && sq_commit == sq_alloc && dut.sq_count == 0 && dut.lq_count == 0);
    repeat (100) @(posedge clk);
    foreach (stored[i])
      check(l2_rd(pa_of(stored[i])) == model[stored[i]], $sformatf("next-level memory word %h", stored[i]));

    check(n_sb_go == n_sb_expected, $sformatf("sub-batches issued %0d expected %0d", n_sb_go, n_sb_expected));

    // batch of 8 threads (the size used for data-intensive services): the
    // stack region holds 8 stacks and every instruction costs one sub-batch
    repeat (2) @(posedge clk); #1;
    batch_size = 6'd8;
    begin
      int sb0, i0, c0;
      sb0 = n_sb_go; i0 = n_ins; c0 = n_cyc;
      for (int n = 0; n < 300; n++) begin
        int kind;
        kind = $urandom_range(0, 7);
        issue(kind, 32'hFF);
        if (kind inside {0, 2, 4} && $urandom_range(0, 1)) issue(kind + 1, 32'hFF);
      end
      n_b8_ins = n_ins - i0;
      wait (ld_done_cnt == ld_seq && sq_commit == sq_alloc && dut.sq_count == 0 && dut.lq_count == 0);
      repeat (100) @(posedge clk);
      n_b8_sb  = n_sb_go - sb0;
      check(n_b8_sb == n_b8_ins, $sformatf("batch of 8: %0d sub-batches for %0d instructions", n_b8_sb, n_b8_ins));
      foreach (stored[i])
        check(l2_rd(pa_of(stored[i])) == model[stored[i]], $sformatf("next-level memory word %h (batch 8)", stored[i]));
    end
    check(n_fault == 0 || n_fault_exp > 0, "stack faults only when expected");
    $display("mechanisms: instrs %0d (ld %0d st %0d) sub-batches %0d skipped %0d", n_ins, n_ld_ins, n_st_ins, n_sb_go, n_skip);
    $display("  stack lanes %0d stack faults %0d MCU uniform %0d consecutive %0d divergent %0d",
             n_stack_lanes, n_fault, n_mode[1], n_mode[2], n_mode[3]);
    $display("  forwarded rows %0d bank-conflict cycles %0d L1 hits %0d misses %0d L2 reads %0d writes %0d",
             n_fwd, n_conflict, n_l1_hit, n_l1_miss, n_l2_rd, n_l2_wr);
    $display("  TLB miss cycles %0d fills %0d invalidations %0d  lane values checked %0d",
             n_tlb_miss_cyc, n_tlb_fill, n_tlb_inv, n_lane_checks);
    $display("  batch of 8: %0d instructions in %0d sub-batches", n_b8_ins, n_b8_sb);
    $display("  8-byte stack push of 32 threads: %0d line writes", n_push_writes);
    $display("  divergences %0d reconvergences %0d MinSP picks %0d escape cycles %0d votes %0d split votes %0d exits %0d",
             n_diverge, n_reconv, n_minsp, n_switch, n_vote, n_vote_split, n_exit);
    check(n_diverge > 0,  "mechanism: divergence");
    check(n_reconv > 0,   "mechanism: reconvergence");
    check(n_minsp > 0,    "mechanism: MinSP priority");
    check(n_switch > 0,   "mechanism: deadlock escape");
    check(n_vote_split > 0, "mechanism: majority vote over disagreeing threads");
    check(n_exit > 0,     "mechanism: thread exit");
    check(n_skip > 0,     "mechanism: empty sub-batch skipped");
    check(n_stack_lanes > 0, "mechanism: stack interleaving");
    check(n_fault > 0,    "mechanism: cross-thread stack fault");
    check(n_mode[1] > 0 && n_mode[2] > 0 && n_mode[3] > 0, "mechanism: three coalescing modes");
    check(n_fwd > 0,      "mechanism: store-to-load forwarding");
    check(n_conflict > 0, "mechanism: bank conflict");
    check(n_tlb_fill > 0 && n_tlb_inv > 0, "mechanism: TLB miss, refill and invalidation");
    check(n_l1_hit > 0 && n_l1_miss > 0, "mechanism: L1 hit and miss");
    check(n_l2_wr > 0,    "mechanism: write-through store drain");
    check(n_lane_checks > 10000, "load values checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (lq %0d sq %0d done %0d/%0d commit %0d/%0d)", dut.lq_count, dut.sq_count,
             ld_done_cnt, ld_seq, sq_commit, sq_alloc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

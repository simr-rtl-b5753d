// rpu_simr_core: the SIMT additions of one RPU (Request Processing Unit) core.
//
// An RPU core is an out-of-order CPU core that runs a batch of BATCH similar
// requests (threads) in lock step. This module holds the parts that make a
// conventional core a SIMT core; the core itself (x86 fetch/decode, rename,
// reorder buffer, scheduler, execution units, register file) sits outside and
// talks to it through the ports below.
//
// Control side
//   simt_optimizer  per-thread PC/SP; picks the MinSP-PC path and its active
//                   mask for fetch (sel_*), with the atomics-based deadlock
//                   escape. Fed by per-thread next PCs at commit (commit_*).
//   majority_vote   reduces the per-thread outcome of a resolved branch
//                   (br_*) to one outcome for the batch branch predictor
//                   (bp_*).
// Memory side (one batch-wide memory instruction at a time on mi_*)
//   subbatch_issue  splits the BATCH-thread instruction into LANES-wide
//                   sub-batches, skipping empty ones;
//   stack_agu       remaps stack accesses into the 4-byte interleaved stack
//                   space of the batch, flags forbidden cross-thread ones;
//   mcu             detects uniform / consecutive-word sub-batches and shapes
//                   the access as a load/store-queue row;
//   store_queue     lane-wide rows, per-lane forwarding CAM, drain on commit;
//   load_queue      lane-wide rows, per-slot valid bits, tag broadcast;
//   l1_xbar         8x8 crossbar between lane ports and L1 banks;
//   tlb_bank x NBANKS, l1_bank x NBANKS
//                   each L1 bank with its own TLB bank; TLB misses are
//                   reported (tlb_miss*) and refilled from outside
//                   (tlb_fill*), invalidations are broadcast to all banks.
//
// Timing of a load sub-batch: issue (cycle 0, combinational through the
// stack AGU) -> MCU register (1) -> queue row allocated (2) -> crossbar and
// TLB, accepted by the bank (2 at the earliest) -> bank answer HIT_LAT
// cycles later -> slot valid -> completion broadcast one cycle after the last
// slot. Stores drain to the banks (write-through) after st_commit_valid.
// Load data reach the register file side through rsp_* (whole lines per lane
// port) and fwd_* (values forwarded from the store queue).
//
// Sizes follow the evaluated RPU configuration (32-thread batches, 8 lanes,
// 128/64-row queues, 8 L1 banks of 32 KB, 8-way, 8-cycle hit, 32-entry TLB
// banks). Handshakes, the one-instruction-at-a-time memory front end, the
// queue-space check before issue and the store-over-load priority at the
// crossbar are this design's own choices.
module rpu_simr_core
  import rpu_pkg::mcu_mode_e;
#(
  parameter int unsigned BATCH         = 32,
  parameter int unsigned LANES         = 8,
  parameter int unsigned PC_W          = 48,
  parameter int unsigned VA_W          = 48,
  parameter int unsigned PA_W          = 48,
  parameter int unsigned LQ_ROWS       = 128,
  parameter int unsigned SQ_ROWS       = 64,
  parameter int unsigned NBANKS        = 8,
  parameter int unsigned TLB_ENTRIES   = 32,
  parameter int unsigned L1_BANK_BYTES = 32768,
  parameter int unsigned L1_WAYS       = 8,
  parameter int unsigned L1_HIT_LAT    = 8,
  parameter int unsigned TAG_W         = 8,
  parameter int unsigned K_CYC         = 64,
  parameter int unsigned B_ATOM        = 4,
  parameter int unsigned T_CYC         = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // ---- batch launch and per-thread commit (from the OoO core) ----
  input  logic                              launch_valid,
  input  logic [BATCH-1:0]                  launch_mask,
  input  logic [PC_W-1:0]                   launch_pc,
  input  logic [BATCH-1:0][PC_W-1:0]        launch_sp,
  input  logic                              commit_valid,
  input  logic [BATCH-1:0]                  commit_mask,
  input  logic [BATCH-1:0][PC_W-1:0]        commit_pc,
  input  logic [BATCH-1:0][PC_W-1:0]        commit_sp,
  input  logic [BATCH-1:0]                  commit_exit,
  input  logic                              atomic_dec,
  // ---- selected path (to fetch) ----
  output logic                              sel_valid,
  output logic [PC_W-1:0]                   sel_pc,
  output logic [PC_W-1:0]                   sel_sp,
  output logic [BATCH-1:0]                  sel_mask,
  output logic                              sel_switched,
  // ---- branch resolution and predictor update ----
  input  logic                              br_valid,
  input  logic [BATCH-1:0]                  br_active,
  input  logic [BATCH-1:0]                  br_taken,
  input  logic [BATCH-1:0][PC_W-1:0]        br_target,
  output logic                              bp_valid,
  output logic                              bp_taken,
  output logic [PC_W-1:0]                   bp_target,
  output logic [BATCH-1:0]                  bp_agree_mask,
  // ---- batch-wide memory instruction ----
  input  logic                              mi_valid,
  output logic                              mi_ready,
  input  logic                              mi_store,
  input  logic [BATCH-1:0]                  mi_mask,
  input  logic [BATCH-1:0][VA_W-1:0]        mi_addr,
  input  logic [BATCH-1:0][31:0]            mi_data,
  input  logic [TAG_W-1:0]                  mi_tag,
  // stack-segment configuration of the running batch
  input  logic [VA_W-1:0]                   ss0,
  input  logic [5:0]                        stack_log2,
  input  logic [$clog2(BATCH+1)-1:0]        batch_size,
  input  logic                              xstack_allow,
  output logic                              stack_fault,
  output logic [TAG_W-1:0]                  stack_fault_tag,
  // store commit (oldest store row)
  input  logic                              st_commit_valid,
  // load completion broadcast: instruction tag and sub-batch
  output logic                              ld_done_valid,
  output logic [TAG_W-1:0]                  ld_done_tag,
  output logic [$clog2(BATCH/LANES)-1:0]    ld_done_sb,
  // load data towards the register file
  output logic                              fwd_valid,
  output logic [$clog2(LQ_ROWS)-1:0]        fwd_row,
  output logic [LANES-1:0]                  fwd_mask,
  output logic [LANES-1:0][31:0]            fwd_data,
  output logic [LANES-1:0]                  rsp_valid,
  output logic [LANES-1:0][$clog2(LQ_ROWS)-1:0] rsp_row,
  output logic [LANES-1:0][255:0]           rsp_line,
  // ---- TLB maintenance ----
  output logic [NBANKS-1:0]                 tlb_miss,
  output logic [NBANKS-1:0][VA_W-13:0]      tlb_miss_vpn,
  input  logic                              tlb_fill_valid,
  input  logic [NBANKS-1:0]                 tlb_fill_banks,
  input  logic [VA_W-13:0]                  tlb_fill_vpn,
  input  logic [PA_W-13:0]                  tlb_fill_ppn,
  input  logic                              tlb_inv_valid,
  input  logic [VA_W-13:0]                  tlb_inv_vpn,
  input  logic                              tlb_flush,
  // ---- next level (L2), one port per L1 bank ----
  output logic [NBANKS-1:0]                 l2_req_valid,
  input  logic [NBANKS-1:0]                 l2_req_ready,
  output logic [NBANKS-1:0]                 l2_req_we,
  output logic [NBANKS-1:0][PA_W-1:0]       l2_req_addr,
  output logic [NBANKS-1:0][255:0]          l2_req_wdata,
  output logic [NBANKS-1:0][7:0]            l2_req_wmask,
  input  logic [NBANKS-1:0]                 l2_rsp_valid,
  input  logic [NBANKS-1:0][255:0]          l2_rsp_data
);

  localparam int unsigned NSB   = BATCH / LANES;
  localparam int unsigned SB_W  = $clog2(NSB);
  localparam int unsigned LQ_W  = $clog2(LQ_ROWS);
  localparam int unsigned PS_W  = $clog2(LANES);
  localparam int unsigned LINE  = 256;
  localparam int unsigned VPN_W = VA_W - 12;
  localparam int unsigned PPN_W = PA_W - 12;
  localparam int unsigned ID_W  = PS_W + LQ_W;

  initial assert (LANES == rpu_pkg::LANES && NBANKS == rpu_pkg::NBANKS &&
                  VA_W == rpu_pkg::VA_W)
    else $error("rpu_simr_core: lane/bank geometry must match rpu_pkg");

  // ======================= control side =======================
  simt_optimizer #(.BATCH(BATCH), .PC_W(PC_W), .K_CYC(K_CYC),
                   .B_ATOM(B_ATOM), .T_CYC(T_CYC)) u_opt (
    .clk, .rst_n,
    .launch_valid, .launch_mask, .launch_pc, .launch_sp,
    .commit_valid, .commit_mask, .commit_pc, .commit_sp, .commit_exit,
    .atomic_dec,
    .sel_valid, .sel_pc, .sel_sp, .sel_mask, .sel_switched
  );

  logic [$clog2(BATCH+1)-1:0] mv_taken_cnt, mv_active_cnt;
  majority_vote #(.BATCH(BATCH), .PC_W(PC_W)) u_mv (
    .clk, .rst_n,
    .in_valid(br_valid), .active(br_active), .taken(br_taken), .target(br_target),
    .out_valid(bp_valid), .maj_taken(bp_taken), .maj_target(bp_target),
    .agree_mask(bp_agree_mask), .taken_cnt(mv_taken_cnt), .active_cnt(mv_active_cnt)
  );

  // ======================= memory side =======================
  // operands of the instruction being split into sub-batches
  logic [BATCH-1:0][VA_W-1:0] mi_addr_q;
  logic [BATCH-1:0][31:0]     mi_data_q;

  logic                      sb_valid, sb_ready, sb_first, sb_last;
  logic [LANES-1:0]          sb_mask;
  logic [SB_W-1:0]           sb_idx;
  logic [TAG_W:0]            sb_tag;      // {store, tag}
  logic [$clog2(LQ_ROWS+1)-1:0] lq_count;
  logic [$clog2(SQ_ROWS+1)-1:0] sq_count;

  // room for the row in the MCU register and the one being issued
  assign sb_ready = int'(lq_count) + 2 <= LQ_ROWS && int'(sq_count) + 2 <= SQ_ROWS;

  subbatch_issue #(.BATCH(BATCH), .LANES(LANES), .TAG_W(TAG_W + 1)) u_sbi (
    .clk, .rst_n,
    .in_valid(mi_valid), .in_ready(mi_ready), .in_mask(mi_mask),
    .in_tag({mi_store, mi_tag}),
    .out_valid(sb_valid), .out_ready(sb_ready), .out_lane_mask(sb_mask),
    .out_sb(sb_idx), .out_first(sb_first), .out_last(sb_last), .out_tag(sb_tag)
  );

  always_ff @(posedge clk)
    if (mi_valid && mi_ready) begin
      mi_addr_q <= mi_addr;
      mi_data_q <= mi_data;
    end

  // lanes of the current sub-batch
  logic [LANES-1:0][VA_W-1:0]          ln_va, agu_va;
  logic [LANES-1:0][31:0]              ln_data;
  logic [LANES-1:0][$clog2(BATCH)-1:0] ln_tid, agu_ttid;
  logic [LANES-1:0]                    agu_stack, agu_fault, ln_mask;
  logic                                sb_go;

  assign sb_go = sb_valid && sb_ready;
  always_comb
    for (int l = 0; l < LANES; l++) begin
      ln_va[l]   = mi_addr_q[int'(sb_idx) * LANES + l];
      ln_data[l] = mi_data_q[int'(sb_idx) * LANES + l];
      ln_tid[l]  = ($clog2(BATCH))'(int'(sb_idx) * LANES + l);
    end

  stack_agu #(.LANES(LANES), .BATCH(BATCH), .VA_W(VA_W), .IL_BYTES(4)) u_agu (
    .lane_valid(sb_mask), .lane_tid(ln_tid), .lane_va(ln_va),
    .ss0, .stack_log2, .batch_size, .xstack_allow,
    .out_va(agu_va), .is_stack(agu_stack), .target_tid(agu_ttid), .fault(agu_fault)
  );

  // faulting lanes are dropped and reported
  assign ln_mask         = sb_mask & ~agu_fault;
  assign stack_fault     = sb_go && agu_fault != '0;
  assign stack_fault_tag = sb_tag[TAG_W-1:0];

  // MCU payload: store flag, tag, sub-batch, per-lane addresses and data
  typedef struct packed {
    logic                       st;
    logic [TAG_W-1:0]           tag;
    logic [SB_W-1:0]            sb;
    logic [LANES-1:0][VA_W-1:0] va;
    logic [LANES-1:0][31:0]     data;
  } mpay_t;

  mpay_t                      mc_pay_in, mc_pay;
  logic                       mc_valid;
  mcu_mode_e                  mc_mode;
  logic [LANES-1:0]           mc_lmask, mc_smask;
  logic [LANES-1:0][VA_W-1:0] mc_saddr;
  logic [$clog2(LANES+1)-1:0] mc_nacc;

  assign mc_pay_in = '{st: sb_tag[TAG_W], tag: sb_tag[TAG_W-1:0], sb: sb_idx,
                       va: agu_va, data: ln_data};

  mcu #(.LANES(LANES), .VA_W(VA_W), .LINE_BYTES(32), .WORD_BYTES(4),
        .PAY_W($bits(mpay_t))) u_mcu (
    .clk, .rst_n,
    .in_valid(sb_go && ln_mask != '0), .in_mask(ln_mask), .in_addr(agu_va),
    .in_payload(mc_pay_in),
    .out_valid(mc_valid), .out_mode(mc_mode), .out_lane_mask(mc_lmask),
    .out_slot_mask(mc_smask), .out_slot_addr(mc_saddr), .out_n_access(mc_nacc),
    .out_payload(mc_pay)
  );

  // ---- store queue ----
  logic [LANES-1:0]             fq_hit;
  logic [LANES-1:0][31:0]       fq_data;
  logic [LANES-1:0]             dr_valid, dr_grant;
  logic [LANES-1:0][VA_W-1:0]   dr_addr;
  logic [LANES-1:0][LINE-1:0]   dr_wdata;
  logic [LANES-1:0][7:0]        dr_wmask;
  logic                         sq_ready_unused;

  store_queue #(.ROWS(SQ_ROWS), .LANES(LANES), .VA_W(VA_W), .DATA_W(32),
                .LINE_BYTES(32)) u_sq (
    .clk, .rst_n,
    .alloc_valid(mc_valid && mc_pay.st), .alloc_ready(sq_ready_unused),
    .alloc_mode(mc_mode), .alloc_lane_mask(mc_lmask), .alloc_slot_mask(mc_smask),
    .alloc_addr(mc_saddr), .alloc_data(mc_pay.data),
    .commit_valid(st_commit_valid),
    .q_mask(mc_valid && !mc_pay.st ? mc_lmask : '0), .q_addr(mc_pay.va),
    .q_hit(fq_hit), .q_data(fq_data),
    .drain_valid(dr_valid), .drain_addr(dr_addr), .drain_wdata(dr_wdata),
    .drain_wmask(dr_wmask), .drain_grant(dr_grant), .count(sq_count)
  );

  // ---- load queue ----
  logic [LANES-1:0]             ld_done_slots;
  logic                         lq_ready_unused;
  logic [LQ_W-1:0]              lq_alloc_row;
  logic [LANES-1:0]             is_valid, is_grant;
  logic [LANES-1:0][VA_W-1:0]   is_addr;
  logic [LQ_W-1:0]              is_row;
  logic [LANES-1:0]             fl_valid;
  logic [LANES-1:0][LQ_W-1:0]   fl_row;
  logic [LQ_W-1:0]              done_row;
  logic [LANES-1:0]             done_lmask;
  mcu_mode_e                    done_mode;
  logic [TAG_W+SB_W-1:0]        done_tag;

  // a slot is satisfied by forwarding when every lane it serves hit
  always_comb begin
    ld_done_slots = '0;
    if (mc_mode == rpu_pkg::MCU_DIVERGENT) ld_done_slots = fq_hit & mc_smask;
    else ld_done_slots[0] = (fq_hit & mc_lmask) == mc_lmask;
  end

  load_queue #(.ROWS(LQ_ROWS), .LANES(LANES), .VA_W(VA_W),
               .TAG_W(TAG_W + SB_W)) u_lq (
    .clk, .rst_n,
    .alloc_valid(mc_valid && !mc_pay.st), .alloc_ready(lq_ready_unused),
    .alloc_row(lq_alloc_row),
    .alloc_mode(mc_mode), .alloc_lane_mask(mc_lmask), .alloc_slot_mask(mc_smask),
    .alloc_done_mask(ld_done_slots), .alloc_addr(mc_saddr),
    .alloc_tag({mc_pay.tag, mc_pay.sb}),
    .iss_valid(is_valid), .iss_addr(is_addr), .iss_row(is_row), .iss_grant(is_grant),
    .fill_valid(fl_valid), .fill_row(fl_row),
    .done_valid(ld_done_valid), .done_tag(done_tag), .done_row(done_row),
    .done_lane_mask(done_lmask), .done_mode(done_mode), .count(lq_count)
  );

  assign ld_done_tag = done_tag[TAG_W+SB_W-1 -: TAG_W];
  assign ld_done_sb  = done_tag[SB_W-1:0];

  assign fwd_valid = mc_valid && !mc_pay.st && (fq_hit & mc_lmask) != '0;
  assign fwd_row   = lq_alloc_row;
  assign fwd_mask  = fq_hit & mc_lmask;
  assign fwd_data  = fq_data;

  // ---- lane ports into the crossbar: committed stores first ----
  typedef struct packed {
    logic            we;
    logic [7:0]      wmask;
    logic [LINE-1:0] wdata;
    logic [LQ_W-1:0] row;
  } xreq_t;

  logic                        use_sq;
  logic [LANES-1:0]            x_valid, x_grant;
  logic [LANES-1:0][VA_W-1:0]  x_addr;
  xreq_t [LANES-1:0]           x_pay;

  assign use_sq = dr_valid != '0;
  always_comb
    for (int l = 0; l < LANES; l++) begin
      x_valid[l] = use_sq ? dr_valid[l] : is_valid[l];
      x_addr[l]  = use_sq ? dr_addr[l]  : is_addr[l];
      x_pay[l]   = use_sq ? '{we: 1'b1, wmask: dr_wmask[l], wdata: dr_wdata[l], row: '0}
                          : '{we: 1'b0, wmask: '0, wdata: '0, row: is_row};
    end
  assign dr_grant = use_sq ? x_grant : '0;
  assign is_grant = use_sq ? '0 : x_grant;

  logic [NBANKS-1:0]                 bk_valid, bk_ready, bk_rvalid, bk_rready;
  logic [NBANKS-1:0][VA_W-1:0]       bk_addr;
  xreq_t [NBANKS-1:0]                bk_pay;
  logic [NBANKS-1:0][PS_W-1:0]       bk_src, bk_rdst;
  logic [NBANKS-1:0][LQ_W+LINE-1:0]  bk_rdata;
  logic [LANES-1:0]                  xo_valid;
  logic [LANES-1:0][LQ_W+LINE-1:0]   xo_data;
  logic [$clog2(LANES+1)-1:0]        x_conflicts;

  l1_xbar #(.NPORTS(LANES), .NBANKS(NBANKS), .AW(VA_W), .PW($bits(xreq_t)),
            .RSPW(LQ_W + LINE), .LINE_OFF_W(5)) u_xbar (
    .clk, .rst_n,
    .req_valid(x_valid), .req_addr(x_addr), .req_pay(x_pay), .req_grant(x_grant),
    .bank_valid(bk_valid), .bank_addr(bk_addr), .bank_pay(bk_pay), .bank_src(bk_src),
    .bank_ready(bk_ready),
    .rsp_valid(bk_rvalid), .rsp_dst(bk_rdst), .rsp_data(bk_rdata), .rsp_ready(bk_rready),
    .out_valid(xo_valid), .out_data(xo_data), .conflicts(x_conflicts)
  );

  // ---- TLB bank + L1 bank per bank ----
  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    logic             t_hit;
    logic [PPN_W-1:0] t_ppn;
    logic [PA_W-1:0]  pa;
    logic             l1_ready;
    logic [ID_W-1:0]  r_id;
    logic [LINE-1:0]  r_line;
    logic             ev_hit, ev_miss;

    tlb_bank #(.ENTRIES(TLB_ENTRIES), .VPN_W(VPN_W), .PPN_W(PPN_W)) u_tlb (
      .clk, .rst_n,
      .lk_vpn(bk_addr[b][VA_W-1:12]), .lk_hit(t_hit), .lk_ppn(t_ppn),
      .fill_valid(tlb_fill_valid && tlb_fill_banks[b]),
      .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn),
      .inv_valid(tlb_inv_valid), .inv_vpn(tlb_inv_vpn), .flush(tlb_flush)
    );

    assign pa              = {t_ppn, bk_addr[b][11:0]};
    assign tlb_miss[b]     = bk_valid[b] && !t_hit;
    assign tlb_miss_vpn[b] = bk_addr[b][VA_W-1:12];
    assign bk_ready[b]     = t_hit && l1_ready;

    l1_bank #(.BANK_BYTES(L1_BANK_BYTES), .WAYS(L1_WAYS), .LINE_BYTES(32),
              .NBANKS(NBANKS), .HIT_LAT(L1_HIT_LAT), .PA_W(PA_W), .ID_W(ID_W)) u_l1 (
      .clk, .rst_n,
      .req_valid(bk_valid[b] && t_hit), .req_ready(l1_ready), .req_addr(pa),
      .req_we(bk_pay[b].we), .req_wdata(bk_pay[b].wdata), .req_wmask(bk_pay[b].wmask),
      .req_id({bk_src[b], bk_pay[b].row}),
      .rsp_valid(bk_rvalid[b]), .rsp_ready(bk_rready[b]), .rsp_id(r_id), .rsp_data(r_line),
      .mem_req_valid(l2_req_valid[b]), .mem_req_ready(l2_req_ready[b]),
      .mem_req_we(l2_req_we[b]), .mem_req_addr(l2_req_addr[b]),
      .mem_req_wdata(l2_req_wdata[b]), .mem_req_wmask(l2_req_wmask[b]),
      .mem_rsp_valid(l2_rsp_valid[b]), .mem_rsp_data(l2_rsp_data[b]),
      .ev_hit, .ev_miss
    );

    assign bk_rdst[b]  = r_id[ID_W-1 -: PS_W];
    assign bk_rdata[b] = {r_id[LQ_W-1:0], r_line};
  end

  // ---- returns: slot valid bits and register-file data ----
  always_comb
    for (int l = 0; l < LANES; l++) begin
      fl_valid[l] = xo_valid[l];
      fl_row[l]   = xo_data[l][LINE +: LQ_W];
      rsp_valid[l] = xo_valid[l];
      rsp_row[l]   = xo_data[l][LINE +: LQ_W];
      rsp_line[l]  = xo_data[l][LINE-1:0];
    end

endmodule

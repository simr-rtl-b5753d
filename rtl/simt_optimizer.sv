// simt_optimizer: stack-less SIMT convergence optimizer of the RPU frontend.
//
// Every thread of the running batch keeps its own program counter (PC) and
// stack pointer (SP); only one path is fetched at a time. The path is chosen
// with the MinSP-PC policy: among the live threads, the lowest SP wins (the
// deepest function call, stacks growing downwards), and among the threads with
// that SP the lowest PC wins (reconvergence points sit at the lowest address of
// the code they dominate). The active mask of the selected path is every live
// thread sitting at that SP and PC, so divergent paths are serialised and merge
// again as soon as their PCs meet.
//
// Deadlock avoidance: when threads have been waiting off the selected path for
// K_CYC cycles without their PC being updated, and at least B_ATOM atomic
// instructions were decoded in that window (a hint that the selected path spins
// on a lock held by a waiting thread), the selected path is excluded and the
// next MinSP-PC path runs for T_CYC cycles. Otherwise the window restarts.
//
// Interface:
//   launch_*  loads a batch: every thread of launch_mask starts at launch_pc
//             with its own SP.
//   commit_*  per-thread next PC and SP for the threads of commit_mask after
//             the selected path executed; commit_exit retires threads.
//   atomic_dec one pulse per decoded atomic instruction.
//   sel_*     the selected path, registered: it reflects the thread state of
//             the previous cycle (one cycle from a commit to the new path).
//
// The policy and the k/b/t mechanism follow the RPU description; the values of
// K_CYC, B_ATOM, T_CYC, the exact window bookkeeping and the single
// excluded-path register are this design's choices.
module simt_optimizer #(
  parameter int unsigned BATCH  = 32,
  parameter int unsigned PC_W   = 48,
  parameter int unsigned K_CYC  = 64,
  parameter int unsigned B_ATOM = 4,
  parameter int unsigned T_CYC  = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // batch launch
  input  logic                       launch_valid,
  input  logic [BATCH-1:0]           launch_mask,
  input  logic [PC_W-1:0]            launch_pc,
  input  logic [BATCH-1:0][PC_W-1:0] launch_sp,
  // per-thread update after the selected path executed
  input  logic                       commit_valid,
  input  logic [BATCH-1:0]           commit_mask,
  input  logic [BATCH-1:0][PC_W-1:0] commit_pc,
  input  logic [BATCH-1:0][PC_W-1:0] commit_sp,
  input  logic [BATCH-1:0]           commit_exit,
  // decoded atomic instruction
  input  logic                       atomic_dec,
  // selected path
  output logic                       sel_valid,
  output logic [PC_W-1:0]            sel_pc,
  output logic [PC_W-1:0]            sel_sp,
  output logic [BATCH-1:0]           sel_mask,
  output logic                       sel_switched   // deadlock-avoidance path
);

  localparam int unsigned KC_W = $clog2(K_CYC + 1);
  localparam int unsigned TC_W = $clog2(T_CYC + 1);
  localparam int unsigned BA_W = $clog2(B_ATOM + 1);

  logic [BATCH-1:0]           live_q;
  logic [BATCH-1:0][PC_W-1:0] pc_q, sp_q;
  logic [BATCH-1:0]           excl_q;      // path excluded while switched
  logic [TC_W-1:0]            sw_cnt_q;
  logic [KC_W-1:0]            stale_cnt_q;
  logic [BA_W-1:0]            atom_cnt_q;

  // ---- MinSP-PC selection over a candidate set ----
  function automatic logic [BATCH-1:0] min_sp_pc(
      input logic [BATCH-1:0]           cand,
      input logic [BATCH-1:0][PC_W-1:0] pcs,
      input logic [BATCH-1:0][PC_W-1:0] sps);
    logic [PC_W-1:0]  msp, mpc;
    logic             any;
    logic [BATCH-1:0] m;
    any = 1'b0;
    msp = '1;
    for (int i = 0; i < BATCH; i++)
      if (cand[i] && (!any || sps[i] < msp)) begin
        msp = sps[i];
        any = 1'b1;
      end
    any = 1'b0;
    mpc = '1;
    for (int i = 0; i < BATCH; i++)
      if (cand[i] && sps[i] == msp && (!any || pcs[i] < mpc)) begin
        mpc = pcs[i];
        any = 1'b1;
      end
    for (int i = 0; i < BATCH; i++)
      m[i] = cand[i] && sps[i] == msp && pcs[i] == mpc;
    return m;
  endfunction

  logic [BATCH-1:0] cand, mask_c;
  logic [PC_W-1:0]  pc_c, sp_c;
  logic             switched_c;

  always_comb begin
    switched_c = (sw_cnt_q != '0) && ((live_q & ~excl_q) != '0);
    cand       = switched_c ? (live_q & ~excl_q) : live_q;
    mask_c     = min_sp_pc(cand, pc_q, sp_q);
    pc_c       = '0;
    sp_c       = '0;
    for (int i = BATCH - 1; i >= 0; i--)
      if (mask_c[i]) begin
        pc_c = pc_q[i];
        sp_c = sp_q[i];
      end
  end

  // threads waiting off the current path, and whether one of them moved
  logic [BATCH-1:0] waiting;
  logic             waiting_moved;
  assign waiting       = live_q & ~sel_mask;
  assign waiting_moved = commit_valid && ((commit_mask & waiting) != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      live_q       <= '0;
      pc_q         <= '0;
      sp_q         <= '0;
      excl_q       <= '0;
      sw_cnt_q     <= '0;
      stale_cnt_q  <= '0;
      atom_cnt_q   <= '0;
      sel_valid    <= 1'b0;
      sel_pc       <= '0;
      sel_sp       <= '0;
      sel_mask     <= '0;
      sel_switched <= 1'b0;
    end else begin
      // thread state
      if (launch_valid) begin
        live_q <= launch_mask;
        for (int i = 0; i < BATCH; i++) begin
          pc_q[i] <= launch_pc;
          sp_q[i] <= launch_sp[i];
        end
      end else if (commit_valid) begin
        for (int i = 0; i < BATCH; i++)
          if (commit_mask[i]) begin
            pc_q[i] <= commit_pc[i];
            sp_q[i] <= commit_sp[i];
          end
        live_q <= live_q & ~commit_exit;
      end

      // deadlock detection window
      if (launch_valid || waiting == '0 || waiting_moved) begin
        stale_cnt_q <= '0;
        atom_cnt_q  <= '0;
      end else if (sw_cnt_q == '0) begin
        if (stale_cnt_q >= KC_W'(K_CYC - 1)) begin
          if (atom_cnt_q + BA_W'(atomic_dec) >= BA_W'(B_ATOM)) begin
            sw_cnt_q <= TC_W'(T_CYC);
            excl_q   <= sel_mask;
          end
          stale_cnt_q <= '0;
          atom_cnt_q  <= '0;
        end else begin
          stale_cnt_q <= stale_cnt_q + 1'b1;
          if (atomic_dec && atom_cnt_q != BA_W'(B_ATOM))
            atom_cnt_q <= atom_cnt_q + 1'b1;
        end
      end
      if (sw_cnt_q != '0) sw_cnt_q <= launch_valid ? '0 : sw_cnt_q - 1'b1;

      // registered selection
      sel_valid    <= mask_c != '0;
      sel_mask     <= mask_c;
      sel_pc       <= pc_c;
      sel_sp       <= sp_c;
      sel_switched <= switched_c;
    end
  end

endmodule

// store_queue: lane-wide store queue of the RPU load/store unit.
//
// All the stores of one sub-batch instruction share a single row, and with it
// one age/PC slot. A row holds one address slot and one data word per SIMT
// lane; a coalesced store (rpu_pkg::MCU_UNIFORM or MCU_CONSEC) uses address
// slot 0 only, and the addresses of the other lanes follow from it.
//
// Store-to-load forwarding uses an independent CAM per lane: lane l of a load
// is compared with lane l of every store row (the same thread; with the weak,
// non-multi-copy-atomic memory model threads only see their own stores before
// they drain), slot 0 being broadcast for coalesced rows (each row keeps the
// index of its first active lane, the owner of slot 0, for the offset of a
// consecutive-word row). The youngest matching store wins. Comparison is at
// word granularity.
//
// Rows are allocated at the tail, marked committed in order by commit_valid,
// and drained from the head once committed: every used slot becomes one L1
// write of a whole line with a word-enable mask (a coalesced row becomes a
// single write carrying every lane's word). drain_grant clears the slots the
// crossbar accepted; the row leaves when none is left.
//
// Interface timing: allocation and commit take effect at the clock edge;
// the forwarding lookup is combinational. Word-granular forwarding, the
// highest-lane-wins rule for a uniform store and write-through draining are
// this design's choices; the row organisation and per-lane CAMs follow the
// RPU description.
module store_queue
  import rpu_pkg::mcu_mode_e;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned LANES = 8,
  parameter int unsigned VA_W = 48,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // allocation from the MCU
  input  logic                           alloc_valid,
  output logic                           alloc_ready,
  input  mcu_mode_e                      alloc_mode,
  input  logic [LANES-1:0]               alloc_lane_mask,
  input  logic [LANES-1:0]               alloc_slot_mask,
  input  logic [LANES-1:0][VA_W-1:0]     alloc_addr,
  input  logic [LANES-1:0][DATA_W-1:0]   alloc_data,
  // in-order commit from the reorder buffer
  input  logic                           commit_valid,
  // forwarding lookup for a load
  input  logic [LANES-1:0]               q_mask,
  input  logic [LANES-1:0][VA_W-1:0]     q_addr,
  output logic [LANES-1:0]               q_hit,
  output logic [LANES-1:0][DATA_W-1:0]   q_data,
  // drain to the L1 crossbar, one request per slot
  output logic [LANES-1:0]               drain_valid,
  output logic [LANES-1:0][VA_W-1:0]     drain_addr,
  output logic [LANES-1:0][LINE_BYTES*8-1:0] drain_wdata,
  output logic [LANES-1:0][LINE_BYTES/(DATA_W/8)-1:0] drain_wmask,
  input  logic [LANES-1:0]               drain_grant,
  output logic [$clog2(ROWS+1)-1:0]      count
);

  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned WB = DATA_W / 8;
  localparam int unsigned NW = LINE_BYTES / WB;
  localparam int unsigned WW = $clog2(WB);
  localparam int unsigned LW = $clog2(LINE_BYTES);

  initial assert (LANES == rpu_pkg::LANES && DATA_W == 8 * rpu_pkg::WORD_BYTES)
    else $error("store_queue lane/word geometry must match rpu_pkg");

  mcu_mode_e                          mode_q  [ROWS];
  logic [ROWS-1:0][LANES-1:0]         lmask_q;
  logic [ROWS-1:0][LANES-1:0]         pend_q;   // slots not yet drained
  logic [ROWS-1:0][rpu_pkg::LANE_W-1:0] first_q; // first active lane (slot 0 owner)
  logic [ROWS-1:0][LANES-1:0][VA_W-1:0]   addr_q;
  logic [ROWS-1:0][LANES-1:0][DATA_W-1:0] data_q;
  logic [RW-1:0]                      head_q, tail_q;
  logic [$clog2(ROWS+1)-1:0]          cnt_q, ncommit_q;

  assign count       = cnt_q;
  assign alloc_ready = cnt_q != ($clog2(ROWS+1))'(ROWS);

  // ---- per-lane forwarding CAM: youngest older store wins ----
  always_comb begin
    logic [RW-1:0] r;
    q_hit  = '0;
    q_data = '0;
    for (int i = 0; i < ROWS; i++) begin
      r = RW'(head_q + RW'(i));
      if (i < int'(cnt_q))
        for (int l = 0; l < LANES; l++)
          if (q_mask[l] && lmask_q[r][l] &&
              (rpu_pkg::lane_addr(mode_q[r], first_q[r], addr_q[r][0], addr_q[r][l], l) >> WW)
                == (q_addr[l] >> WW)) begin
            q_hit[l]  = 1'b1;
            q_data[l] = data_q[r][l];
          end
    end
  end

  // ---- drain of the head row ----
  logic head_ok;
  assign head_ok = cnt_q != '0 && ncommit_q != '0;

  always_comb begin
    logic [VA_W-1:0]       a;
    logic [$clog2(NW)-1:0] w;
    a           = '0;
    w           = '0;
    drain_valid = '0;
    drain_addr  = '0;
    drain_wdata = '0;
    drain_wmask = '0;
    if (head_ok) begin
      drain_valid = pend_q[head_q];
      for (int s = 0; s < LANES; s++) begin
        drain_addr[s] = addr_q[head_q][s];
        if (mode_q[head_q] == rpu_pkg::MCU_DIVERGENT) begin
          w = addr_q[head_q][s][LW-1:WW];
          drain_wmask[s][w]           = 1'b1;
          drain_wdata[s][w*DATA_W +: DATA_W] = data_q[head_q][s];
        end else if (s == 0) begin
          // coalesced: every active lane's word in one line write
          for (int l = 0; l < LANES; l++)
            if (lmask_q[head_q][l]) begin
              a = rpu_pkg::lane_addr(mode_q[head_q], first_q[head_q],
                                     addr_q[head_q][0], addr_q[head_q][l], l);
              w = a[LW-1:WW];
              drain_wmask[0][w]                 = 1'b1;
              drain_wdata[0][w*DATA_W +: DATA_W] = data_q[head_q][l];
            end
        end
      end
    end
  end

  logic pop, push;
  assign push = alloc_valid && alloc_ready;
  logic commit_ok;
  assign commit_ok = commit_valid && ncommit_q < cnt_q;
  assign pop  = head_ok && ((pend_q[head_q] & ~drain_grant) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q    <= '0;
      tail_q    <= '0;
      cnt_q     <= '0;
      ncommit_q <= '0;
      lmask_q   <= '0;
      pend_q    <= '0;
      first_q   <= '0;
      for (int i = 0; i < ROWS; i++) mode_q[i] <= rpu_pkg::MCU_NONE;
    end else begin
      if (push) begin
        mode_q[tail_q]  <= alloc_mode;
        lmask_q[tail_q] <= alloc_lane_mask;
        first_q[tail_q] <= rpu_pkg::first_lane(alloc_lane_mask);
        pend_q[tail_q]  <= alloc_slot_mask;
        addr_q[tail_q]  <= alloc_addr;
        data_q[tail_q]  <= alloc_data;
        tail_q          <= RW'(tail_q + 1'b1);
      end
      if (head_ok) pend_q[head_q] <= pend_q[head_q] & ~drain_grant;
      if (pop) begin
        lmask_q[head_q] <= '0;
        head_q          <= RW'(head_q + 1'b1);
      end
      // the oldest ncommit_q rows are committed
      ncommit_q <= ncommit_q + ($clog2(ROWS+1))'(commit_ok)
                             - ($clog2(ROWS+1))'(pop);
      cnt_q     <= cnt_q + ($clog2(ROWS+1))'(push) - ($clog2(ROWS+1))'(pop);
    end
  end

  // a commit must refer to an allocated store
  assert property (@(posedge clk) disable iff (!rst_n)
                   commit_valid |-> ncommit_q < cnt_q)
    else $error("store_queue: commit without an uncommitted store");

endmodule

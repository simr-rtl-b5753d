// load_queue: lane-wide load queue of the RPU load/store unit.
//
// All the loads of one sub-batch instruction share a single row with one tag,
// one mode and one age. A row holds an address slot per SIMT lane; a coalesced
// load (one access from the coalescing unit) uses slot 0 only. Loaded values
// are not kept here: they are written to the register file directly, and the
// queue only keeps a valid bit per slot. The row is complete, broadcasts its
// tag and is freed once every slot it uses is valid.
//
// Slots already satisfied by store-to-load forwarding are marked valid at
// allocation. Each cycle the oldest row that still has slots to send offers
// all of them to the L1 crossbar (iss_valid); the slots granted by the
// crossbar are marked sent. Lane port l of the crossbar returns slot l of a
// row (fill_valid[l], fill_row[l]).
//
// Timing: allocation, grant and fill take effect at the clock edge; one row
// can complete per cycle (lowest index first); a row filled in cycle c
// completes in cycle c+1. Rows are allocated at the lowest free index and
// their age is a wrapping 16-bit sequence number: both are this design's
// choices.
module load_queue
  import rpu_pkg::mcu_mode_e;
#(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned LANES = 8,
  parameter int unsigned VA_W  = 48,
  parameter int unsigned TAG_W = 8
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // allocation from the MCU
  input  logic                               alloc_valid,
  output logic                               alloc_ready,
  output logic [$clog2(ROWS)-1:0]            alloc_row,
  input  mcu_mode_e                          alloc_mode,
  input  logic [LANES-1:0]                   alloc_lane_mask,
  input  logic [LANES-1:0]                   alloc_slot_mask,
  input  logic [LANES-1:0]                   alloc_done_mask,
  input  logic [LANES-1:0][VA_W-1:0]         alloc_addr,
  input  logic [TAG_W-1:0]                   alloc_tag,
  // issue to the L1 crossbar
  output logic [LANES-1:0]                   iss_valid,
  output logic [LANES-1:0][VA_W-1:0]         iss_addr,
  output logic [$clog2(ROWS)-1:0]            iss_row,
  input  logic [LANES-1:0]                   iss_grant,
  // data returns, one port per lane/slot
  input  logic [LANES-1:0]                   fill_valid,
  input  logic [LANES-1:0][$clog2(ROWS)-1:0] fill_row,
  // completion broadcast
  output logic                               done_valid,
  output logic [TAG_W-1:0]                   done_tag,
  output logic [$clog2(ROWS)-1:0]            done_row,
  output logic [LANES-1:0]                   done_lane_mask,
  output mcu_mode_e                          done_mode,
  output logic [$clog2(ROWS+1)-1:0]          count
);

  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned SW = 16;

  logic [ROWS-1:0]                    used_q;
  logic [ROWS-1:0][LANES-1:0]         need_q;   // slots the row uses
  logic [ROWS-1:0][LANES-1:0]         sent_q;   // slots sent or forwarded
  logic [ROWS-1:0][LANES-1:0]         got_q;    // slots whose data returned
  logic [ROWS-1:0][LANES-1:0][VA_W-1:0] addr_q;
  logic [ROWS-1:0][TAG_W-1:0]         tag_q;
  logic [ROWS-1:0][LANES-1:0]         lmask_q;
  mcu_mode_e                          mode_q [ROWS];
  logic [ROWS-1:0][SW-1:0]            seq_q;
  logic [SW-1:0]                      seq_now_q;
  logic [$clog2(ROWS+1)-1:0]          cnt_q;

  assign count = cnt_q;

  // ---- allocation: lowest free row ----
  always_comb begin
    alloc_ready = 1'b0;
    alloc_row   = '0;
    for (int r = ROWS - 1; r >= 0; r--)
      if (!used_q[r]) begin
        alloc_ready = 1'b1;
        alloc_row   = RW'(r);
      end
  end

  // ---- issue: oldest row with unsent slots ----
  logic           iss_any;
  logic [SW-1:0]  best_age;
  always_comb begin
    iss_any  = 1'b0;
    iss_row  = '0;
    best_age = '0;
    for (int r = 0; r < ROWS; r++)
      if (used_q[r] && (need_q[r] & ~sent_q[r]) != '0 &&
          (!iss_any || SW'(seq_now_q - seq_q[r]) > best_age)) begin
        iss_any  = 1'b1;
        iss_row  = RW'(r);
        best_age = SW'(seq_now_q - seq_q[r]);
      end
    iss_valid = iss_any ? (need_q[iss_row] & ~sent_q[iss_row]) : '0;
    iss_addr  = addr_q[iss_row];
  end

  // ---- completion: lowest complete row ----
  always_comb begin
    done_valid = 1'b0;
    done_row   = '0;
    for (int r = ROWS - 1; r >= 0; r--)
      if (used_q[r] && (need_q[r] & ~got_q[r]) == '0) begin
        done_valid = 1'b1;
        done_row   = RW'(r);
      end
    done_tag       = tag_q[done_row];
    done_lane_mask = lmask_q[done_row];
    done_mode      = mode_q[done_row];
  end

  logic push;
  assign push = alloc_valid && alloc_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q    <= '0;
      need_q    <= '0;
      sent_q    <= '0;
      got_q     <= '0;
      tag_q     <= '0;
      lmask_q   <= '0;
      seq_q     <= '0;
      seq_now_q <= '0;
      cnt_q     <= '0;
      for (int r = 0; r < ROWS; r++) mode_q[r] <= rpu_pkg::MCU_NONE;
    end else begin
      if (iss_any) sent_q[iss_row] <= sent_q[iss_row] | (iss_valid & iss_grant);
      for (int l = 0; l < LANES; l++)
        if (fill_valid[l]) got_q[fill_row[l]][l] <= 1'b1;
      if (done_valid) used_q[done_row] <= 1'b0;
      if (push) begin
        used_q[alloc_row]  <= 1'b1;
        need_q[alloc_row]  <= alloc_slot_mask;
        sent_q[alloc_row]  <= alloc_done_mask;
        got_q[alloc_row]   <= alloc_done_mask;
        addr_q[alloc_row]  <= alloc_addr;
        tag_q[alloc_row]   <= alloc_tag;
        lmask_q[alloc_row] <= alloc_lane_mask;
        mode_q[alloc_row]  <= alloc_mode;
        seq_q[alloc_row]   <= seq_now_q;
        seq_now_q          <= seq_now_q + 1'b1;
      end
      cnt_q <= cnt_q + ($clog2(ROWS+1))'(push) - ($clog2(ROWS+1))'(done_valid);
    end
  end

  // a data return must belong to a slot that was sent and not yet filled
  for (genvar l = 0; l < LANES; l++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     fill_valid[l] |-> used_q[fill_row[l]] && sent_q[fill_row[l]][l]
                                       && !got_q[fill_row[l]][l])
      else $error("load_queue: unexpected fill on lane %0d", l);
  end

endmodule

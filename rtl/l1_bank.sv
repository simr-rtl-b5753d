// l1_bank: one bank of the RPU's banked L1 data cache.
//
// The 256 KB L1 is built from NBANKS banks interleaved on 32-byte lines; this
// module is one bank (32 KB, 8-way set associative, 128 sets by default). The
// set index is taken from the address bits above the line offset and the bank
// bits, the tag from the rest of the physical address.
//
// Pipeline: a request is accepted when the pipeline moves (req_ready) and
// walks through HIT_LAT-1 registers; the tag and data arrays are read in the
// last one. A load hit answers HIT_LAT cycles after it was accepted with the
// whole line (the lanes pick their words). A load miss stalls the bank: the
// line is read from the next level (mem_*), written into the way chosen by a
// per-set round-robin pointer, and the load then hits. Stores are
// write-through without allocation: they update a hitting line under their
// word mask and are always forwarded to the next level. A response that is
// not accepted (rsp_ready low) also stalls the bank.
//
// The capacity, associativity, line size and 8-cycle hit latency follow the
// RPU configuration; the stall-on-miss pipeline, write-through/no-allocate
// policy and round-robin replacement are this design's choices.
module l1_bank #(
  parameter int unsigned BANK_BYTES = 32768,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned NBANKS     = 8,
  parameter int unsigned HIT_LAT    = 8,
  parameter int unsigned PA_W       = 48,
  parameter int unsigned ID_W       = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // requests from the crossbar
  input  logic                         req_valid,
  output logic                         req_ready,
  input  logic [PA_W-1:0]              req_addr,
  input  logic                         req_we,
  input  logic [LINE_BYTES*8-1:0]      req_wdata,
  input  logic [LINE_BYTES/4-1:0]      req_wmask,
  input  logic [ID_W-1:0]              req_id,
  // load responses
  output logic                         rsp_valid,
  input  logic                         rsp_ready,
  output logic [ID_W-1:0]              rsp_id,
  output logic [LINE_BYTES*8-1:0]      rsp_data,
  // next level (L2)
  output logic                         mem_req_valid,
  input  logic                         mem_req_ready,
  output logic                         mem_req_we,
  output logic [PA_W-1:0]              mem_req_addr,
  output logic [LINE_BYTES*8-1:0]      mem_req_wdata,
  output logic [LINE_BYTES/4-1:0]      mem_req_wmask,
  input  logic                         mem_rsp_valid,
  input  logic [LINE_BYTES*8-1:0]      mem_rsp_data,
  // event counters
  output logic                         ev_hit,
  output logic                         ev_miss
);

  localparam int unsigned LB   = LINE_BYTES * 8;
  localparam int unsigned NWD  = LINE_BYTES / 4;
  localparam int unsigned SETS = BANK_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned LW   = $clog2(LINE_BYTES);
  localparam int unsigned BW   = $clog2(NBANKS);
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned WYW  = $clog2(WAYS);
  localparam int unsigned TW   = PA_W - LW - BW - SW;
  localparam int unsigned D    = HIT_LAT - 1;

  typedef struct packed {
    logic                 v;
    logic [PA_W-1:0]      addr;
    logic                 we;
    logic [LB-1:0]        wdata;
    logic [NWD-1:0]       wmask;
    logic [ID_W-1:0]      id;
  } op_t;

  op_t pipe_q [D];

  logic [TW-1:0]   tag_q  [SETS*WAYS];
  logic [LB-1:0]   data_q [SETS*WAYS];
  logic [SETS*WAYS-1:0] valid_q;
  logic [SETS-1:0][WYW-1:0] rr_q;

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_WAIT} mstate_e;
  mstate_e mst_q;

  // ---- lookup in the last stage ----
  op_t            last;
  logic [SW-1:0]  set;
  logic [TW-1:0]  tag;
  logic           hit;
  logic [WYW-1:0] hway;
  logic [LB-1:0]  hline, merged;

  always_comb begin
    last  = pipe_q[D-1];
    set   = last.addr[LW+BW +: SW];
    tag   = last.addr[PA_W-1 -: TW];
    hit   = 1'b0;
    hway  = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[{set, WYW'(w)}] && tag_q[{set, WYW'(w)}] == tag) begin
        hit  = 1'b1;
        hway = WYW'(w);
      end
    hline  = data_q[{set, hway}];
    merged = hline;
    for (int k = 0; k < NWD; k++)
      if (last.wmask[k]) merged[k*32 +: 32] = last.wdata[k*32 +: 32];
  end

  logic last_done, adv;
  always_comb begin
    if (!last.v)        last_done = 1'b1;
    else if (last.we)   last_done = mem_req_ready && mst_q == M_IDLE;
    else                last_done = hit && (!rsp_valid || rsp_ready);
  end
  assign adv       = last_done;
  assign req_ready = adv;

  // next-level port: write-through of stores, line reads for load misses
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = (last.addr >> LW) << LW;
    mem_req_wdata = last.wdata;
    mem_req_wmask = last.wmask;
    if (last.v && last.we && mst_q == M_IDLE) begin
      mem_req_valid = 1'b1;
      mem_req_we    = 1'b1;
    end else if (mst_q == M_REQ) begin
      mem_req_valid = 1'b1;
    end
  end

  assign ev_hit  = last.v && !last.we && hit && adv;
  assign ev_miss = last.v && !last.we && !hit && mst_q == M_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < D; s++) pipe_q[s] <= '0;
      valid_q   <= '0;
      rr_q      <= '0;
      mst_q     <= M_IDLE;
      rsp_valid <= 1'b0;
      rsp_id    <= '0;
      rsp_data  <= '0;
    end else begin
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (adv) begin
        pipe_q[0]    <= '0;
        pipe_q[0].v  <= req_valid;
        if (req_valid) begin
          pipe_q[0].addr  <= req_addr;
          pipe_q[0].we    <= req_we;
          pipe_q[0].wdata <= req_wdata;
          pipe_q[0].wmask <= req_wmask;
          pipe_q[0].id    <= req_id;
        end
        for (int s = 1; s < D; s++) pipe_q[s] <= pipe_q[s-1];
        if (last.v && !last.we) begin
          rsp_valid <= 1'b1;
          rsp_id    <= last.id;
          rsp_data  <= hline;
        end
      end
      // load miss handling
      case (mst_q)
        M_IDLE: if (last.v && !last.we && !hit) mst_q <= M_REQ;
        M_REQ:  if (mem_req_ready) mst_q <= M_WAIT;
        M_WAIT: if (mem_rsp_valid) begin
          valid_q[{set, rr_q[set]}] <= 1'b1;
          rr_q[set]                     <= WYW'(rr_q[set] + 1'b1);
          mst_q                         <= M_IDLE;
        end
        default: mst_q <= M_IDLE;
      endcase
    end
  end

  // tag and data arrays (no reset; valid_q guards them)
  logic wr_store, wr_fill;
  assign wr_store = adv && last.v && last.we && hit;
  assign wr_fill  = mst_q == M_WAIT && mem_rsp_valid;

  always_ff @(posedge clk) begin
    if (wr_store) data_q[{set, hway}] <= merged;
    if (wr_fill) begin
      tag_q[{set, rr_q[set]}]  <= tag;
      data_q[{set, rr_q[set]}] <= mem_rsp_data;
    end
  end

  initial assert (HIT_LAT >= 2 && SETS >= 2 && TW > 0)
    else $error("l1_bank: unsupported geometry");

endmodule

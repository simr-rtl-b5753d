// l1_xbar: crossbar between the lane ports of the load/store queues and the
// banks of the L1 data cache.
//
// The L1 is split into NBANKS banks interleaved on cache lines (the bank is
// address bits [LINE_OFF_W +: log2(NBANKS)]), so the accesses of one sub-batch
// can be served in parallel as long as they fall into different banks. The
// request network gives every bank a round-robin arbiter over the NPORTS lane
// ports that address it; a port whose request loses (a bank conflict) keeps it
// and retries in a later cycle. The response network routes each bank's
// answer back to the port named in it; if two banks answer the same port in
// one cycle the lower bank wins and the other holds its answer (rsp_ready).
//
// Timing: both networks are combinational (a single hop); the banks register.
// The round-robin policy and the fixed-priority return are this design's
// choices; the crossbar itself and its 8x8 size follow the RPU description.
module l1_xbar #(
  parameter int unsigned NPORTS     = 8,
  parameter int unsigned NBANKS     = 8,
  parameter int unsigned AW         = 48,
  parameter int unsigned PW         = 8,
  parameter int unsigned RSPW       = 8,
  parameter int unsigned LINE_OFF_W = 5
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // lane-side requests
  input  logic [NPORTS-1:0]                 req_valid,
  input  logic [NPORTS-1:0][AW-1:0]         req_addr,
  input  logic [NPORTS-1:0][PW-1:0]         req_pay,
  output logic [NPORTS-1:0]                 req_grant,
  // bank-side requests
  output logic [NBANKS-1:0]                 bank_valid,
  output logic [NBANKS-1:0][AW-1:0]         bank_addr,
  output logic [NBANKS-1:0][PW-1:0]         bank_pay,
  output logic [NBANKS-1:0][$clog2(NPORTS)-1:0] bank_src,
  input  logic [NBANKS-1:0]                 bank_ready,
  // bank-side responses
  input  logic [NBANKS-1:0]                 rsp_valid,
  input  logic [NBANKS-1:0][$clog2(NPORTS)-1:0] rsp_dst,
  input  logic [NBANKS-1:0][RSPW-1:0]       rsp_data,
  output logic [NBANKS-1:0]                 rsp_ready,
  // lane-side responses
  output logic [NPORTS-1:0]                 out_valid,
  output logic [NPORTS-1:0][RSPW-1:0]       out_data,
  // bank conflicts seen this cycle (requests that lost arbitration)
  output logic [$clog2(NPORTS+1)-1:0]       conflicts
);

  localparam int unsigned PSW = $clog2(NPORTS);
  localparam int unsigned BSW = $clog2(NBANKS);

  logic [NBANKS-1:0][PSW-1:0] rr_q;   // highest-priority port per bank

  logic [NPORTS-1:0][BSW-1:0] bsel;
  always_comb
    for (int p = 0; p < NPORTS; p++) bsel[p] = req_addr[p][LINE_OFF_W +: BSW];

  // per-bank winner (independent of bank_ready, so no path from the bank
  // back into its own request)
  always_comb begin
    logic [PSW-1:0] p;
    logic           found;
    bank_valid = '0;
    bank_addr  = '0;
    bank_pay   = '0;
    bank_src   = '0;
    p          = '0;
    for (int b = 0; b < NBANKS; b++) begin
      found = 1'b0;
      for (int k = 0; k < NPORTS; k++) begin
        p = PSW'(rr_q[b] + PSW'(k));
        if (!found && req_valid[p] && bsel[p] == BSW'(b)) begin
          found         = 1'b1;
          bank_valid[b] = 1'b1;
          bank_addr[b]  = req_addr[p];
          bank_pay[b]   = req_pay[p];
          bank_src[b]   = p;
        end
      end
    end
  end

  always_comb begin
    req_grant = '0;
    for (int b = 0; b < NBANKS; b++)
      if (bank_valid[b] && bank_ready[b]) req_grant[bank_src[b]] = 1'b1;
    conflicts = '0;
    for (int q = 0; q < NPORTS; q++)
      conflicts = conflicts + ($clog2(NPORTS+1))'(req_valid[q] && !req_grant[q]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else
      for (int b = 0; b < NBANKS; b++)
        if (bank_valid[b] && bank_ready[b]) rr_q[b] <= PSW'(bank_src[b] + 1'b1);
  end

  // response network
  always_comb begin
    out_valid = '0;
    out_data  = '0;
    rsp_ready = '0;
    for (int b = 0; b < NBANKS; b++)
      if (rsp_valid[b] && !out_valid[rsp_dst[b]]) begin
        out_valid[rsp_dst[b]] = 1'b1;
        out_data[rsp_dst[b]]  = rsp_data[b];
        rsp_ready[b]          = 1'b1;
      end
  end

endmodule

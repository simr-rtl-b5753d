// subbatch_issue: sub-batch interleaving of a batch-wide instruction.
//
// The RPU has fewer SIMT lanes (LANES, m) than threads in a batch (BATCH, n),
// so an instruction of a batch is issued over several cycles, LANES threads
// (one sub-batch) per cycle. Sub-batches without any active thread are
// skipped, which lowers the cost of control divergence and lets a small batch
// (for instance 8 threads) use the lanes fully.
//
// Interface: an instruction is accepted with in_valid/in_ready together with
// its BATCH-bit active mask and an opaque tag. Sub-batch k covers threads
// k*LANES .. k*LANES+LANES-1. Each cycle with out_ready high one non-empty
// sub-batch leaves, lowest index first, with its lane mask, its index and
// first/last flags. A new instruction is accepted in the cycle the last
// sub-batch of the previous one leaves, so the unit sustains one sub-batch per
// cycle: an instruction with s non-empty sub-batches takes s cycles. An
// all-zero mask is accepted and dropped (this design's choice).
module subbatch_issue #(
  parameter int unsigned BATCH = 32,
  parameter int unsigned LANES = 8,
  parameter int unsigned TAG_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [BATCH-1:0]         in_mask,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [LANES-1:0]         out_lane_mask,
  output logic [$clog2(BATCH/LANES)-1:0] out_sb,
  output logic                     out_first,
  output logic                     out_last,
  output logic [TAG_W-1:0]         out_tag
);

  localparam int unsigned NSB  = BATCH / LANES;
  localparam int unsigned SB_W = $clog2(NSB);

  initial assert (BATCH % LANES == 0 && NSB >= 2)
    else $error("BATCH must be a multiple of LANES, at least 2 sub-batches");

  logic [NSB-1:0][LANES-1:0] rem_q;
  logic [TAG_W-1:0]          tag_q;
  logic                      first_q;

  logic [NSB-1:0]  nz;
  logic [SB_W-1:0] pick;
  logic            found, more;

  always_comb begin
    for (int k = 0; k < NSB; k++) nz[k] = rem_q[k] != '0;
    pick  = '0;
    found = 1'b0;
    for (int k = 0; k < NSB; k++)
      if (nz[k] && !found) begin
        pick  = SB_W'(k);
        found = 1'b1;
      end
    more = 1'b0;
    for (int k = 0; k < NSB; k++)
      if (nz[k] && SB_W'(k) != pick) more = 1'b1;
  end

  assign out_valid     = found;
  assign out_lane_mask = rem_q[pick];
  assign out_sb        = pick;
  assign out_first     = first_q;
  assign out_last      = !more;
  assign out_tag       = tag_q;
  assign in_ready      = !found || (out_ready && !more);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q   <= '0;
      tag_q   <= '0;
      first_q <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        rem_q   <= in_mask;
        tag_q   <= in_tag;
        first_q <= 1'b1;
      end else if (found && out_ready) begin
        rem_q[pick] <= '0;
        first_q     <= 1'b0;
      end
    end
  end

endmodule

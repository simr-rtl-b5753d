// stack_agu: stack-segment coalescing in the address generation unit.
//
// The runtime allocates the stacks of the BATCH threads of a batch as one
// contiguous virtual region: thread t's stack is [SS0 + t*StackSize,
// SS0 + (t+1)*StackSize). In hardware the stacks are interleaved every
// IL_BYTES (4) bytes: the word at offset o of thread t's stack lives at
//
//     SS0 + ((o / IL) * BS + t) * IL + (o % IL)
//
// so that the same stack slot of all threads of a batch is adjacent in memory
// and a push, pop or local-variable access of a whole sub-batch falls into one
// cache line. Every lane is rebased on thread 0's stack base, so one TLB
// translation (of a page BS times larger) serves the whole batch.
// The owner of a stack address is TargetTID = (SSi - SS0) / StackSize, which
// lets a thread reach another thread's stack; if that is not allowed
// (xstack_allow low) the lane reports a fault.
//
// Interface: purely combinational, LANES lanes in parallel. StackSize is a
// power of two given as stack_log2; batch_size is the number of threads
// (BS) of the running batch. Addresses outside the stack region pass through
// unchanged with is_stack low. Accesses are assumed not to cross a 4-byte
// interleave unit (wider accesses are split earlier in the pipeline): this
// and the power-of-two stack size are this design's choices.
module stack_agu #(
  parameter int unsigned LANES    = 8,
  parameter int unsigned BATCH    = 32,
  parameter int unsigned VA_W     = 48,
  parameter int unsigned IL_BYTES = 4
) (
  input  logic [LANES-1:0]                      lane_valid,
  input  logic [LANES-1:0][$clog2(BATCH)-1:0]   lane_tid,
  input  logic [LANES-1:0][VA_W-1:0]            lane_va,
  input  logic [VA_W-1:0]                       ss0,
  input  logic [5:0]                            stack_log2,
  input  logic [$clog2(BATCH+1)-1:0]            batch_size,
  input  logic                                  xstack_allow,
  output logic [LANES-1:0][VA_W-1:0]            out_va,
  output logic [LANES-1:0]                      is_stack,
  output logic [LANES-1:0][$clog2(BATCH)-1:0]   target_tid,
  output logic [LANES-1:0]                      fault
);

  localparam int unsigned TID_W = $clog2(BATCH);
  localparam int unsigned IL_W  = $clog2(IL_BYTES);

  logic [VA_W-1:0] region, smask;

  always_comb begin
    smask  = (VA_W'(1) << stack_log2) - 1'b1;
    region = VA_W'(batch_size) << stack_log2;
    for (int l = 0; l < LANES; l++) begin
      logic [VA_W-1:0] off, soff, ttid, slot;
      off  = lane_va[l] - ss0;
      soff = off & smask;
      ttid = off >> stack_log2;
      slot = soff >> IL_W;
      is_stack[l]   = lane_valid[l] && lane_va[l] >= ss0 && off < region;
      target_tid[l] = is_stack[l] ? TID_W'(ttid) : '0;
      fault[l]      = is_stack[l] && !xstack_allow && TID_W'(ttid) != lane_tid[l];
      out_va[l]     = is_stack[l]
                    ? ss0 + (((slot * VA_W'(batch_size)) + ttid) << IL_W)
                          + (soff & VA_W'(IL_BYTES - 1))
                    : lane_va[l];
    end
  end

endmodule

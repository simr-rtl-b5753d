// rpu_pkg: constants and types shared by the SIMT additions of one RPU core.
//
// The RPU runs one batch of BATCH requests (threads) in lock step on an
// out-of-order core with LANES SIMT lanes; a batch-wide instruction is issued
// to the lanes as BATCH/LANES sub-batches. The numbers below follow the
// evaluated configuration (32-thread batches, 8 lanes, 8 L1 banks of 32-byte
// lines, 128/64-row load/store queues, 256-entry DTLB in 8 banks). Address
// widths (48-bit virtual and physical) and the 4 KB page are this design's
// own choices.
package rpu_pkg;

  localparam int unsigned BATCH      = 32;  // threads per batch (SIMT-32)
  localparam int unsigned LANES      = 8;   // SIMT lanes per execution unit
  localparam int unsigned VA_W       = 48;  // virtual address width
  localparam int unsigned PA_W       = 48;  // physical address width
  localparam int unsigned LINE_BYTES = 32;  // L1 line = bank interleave
  localparam int unsigned WORD_BYTES = 4;   // coalescing / stack word
  localparam int unsigned NBANKS     = 8;   // L1 data banks = TLB banks
  localparam int unsigned PAGE_BITS  = 12;  // 4 KB pages
  localparam int unsigned LQ_ROWS    = 128;
  localparam int unsigned SQ_ROWS    = 64;
  localparam int unsigned DATA_W     = 32;  // one word per lane slot

  localparam int unsigned LINE_OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned BANK_W     = $clog2(NBANKS);
  localparam int unsigned LANE_W     = $clog2(LANES);

  // Coalescing decision of the MCU for one sub-batch.
  typedef enum logic [1:0] {
    MCU_NONE      = 2'd0,  // no active lane
    MCU_UNIFORM   = 2'd1,  // every active lane reads/writes the same word
    MCU_CONSEC    = 2'd2,  // lane i touches word base+i of one line
    MCU_DIVERGENT = 2'd3   // one access per active lane
  } mcu_mode_e;

  // Bank index of a byte address: lines are interleaved over the banks.
  function automatic logic [BANK_W-1:0] bank_of(input logic [VA_W-1:0] a);
    return a[LINE_OFF_W +: BANK_W];
  endfunction

  localparam int unsigned LINE_WORDS = LINE_BYTES / WORD_BYTES;
  localparam int unsigned WORD_OFF_W = $clog2(WORD_BYTES);

  // First set bit of a lane mask.
  function automatic logic [LANE_W-1:0] first_lane(input logic [LANES-1:0] m);
    logic [LANE_W-1:0] f;
    f = '0;
    for (int l = LANES - 1; l >= 0; l--)
      if (m[l]) f = LANE_W'(l);
    return f;
  endfunction

  // Byte address of the word lane l touches in a load/store-queue row, given
  // the row's coalescing mode: a coalesced row keeps only slot 0 (the first
  // active lane's address, first = that lane's index); lane l of an
  // MCU_CONSEC row is (l - first) words further, every lane of an
  // MCU_UNIFORM row shares slot 0's word.
  function automatic logic [VA_W-1:0] lane_addr(
      input mcu_mode_e         mode,
      input logic [LANE_W-1:0] first,
      input logic [VA_W-1:0]   slot0,
      input logic [VA_W-1:0]   slot_l,
      input int unsigned       l);
    case (mode)
      MCU_UNIFORM: return slot0;
      MCU_CONSEC:  return slot0 + (VA_W'(l) - VA_W'(first)) * VA_W'(WORD_BYTES);
      default:     return slot_l;
    endcase
  endfunction

endpackage

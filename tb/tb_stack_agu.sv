// tb_stack_agu: self-checking test of stack-segment interleaving.
//
// Random lane addresses inside and outside the batch's stack region are
// remapped and compared with the interleaving formula evaluated here:
//   owner  t = (va - SS0) >> log2(StackSize),  o = (va - SS0) mod StackSize
//   mapped   = SS0 + ((o >> 2) * BS + t) * 4 + (o mod 4)
// It also checks that the same stack slot of 8 consecutive threads maps to 8
// consecutive words of one 32-byte line, and that a cross-thread stack access
// faults unless it is allowed.
module tb_stack_agu;
  localparam int LANES = 8, BATCH = 32, VA_W = 48;

  logic [LANES-1:0]                    lane_valid, is_stack, fault;
  logic [LANES-1:0][$clog2(BATCH)-1:0] lane_tid, target_tid;
  logic [LANES-1:0][VA_W-1:0]          lane_va, out_va;
  logic [VA_W-1:0]                     ss0;
  logic [5:0]                          stack_log2;
  logic [$clog2(BATCH+1)-1:0]          batch_size;
  logic                                xstack_allow;

  stack_agu #(.LANES(LANES), .BATCH(BATCH), .VA_W(VA_W), .IL_BYTES(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    xstack_allow = 0;
    // directed: 8 threads push to the same slot of their own stacks
    ss0 = 48'h7F00_0000_0000; stack_log2 = 16; batch_size = 32;
    lane_valid = '1;
    for (int l = 0; l < LANES; l++) begin
      lane_tid[l] = 5'(8 + l);
      lane_va[l]  = ss0 + 48'(8 + l) * 48'h1_0000 + 48'hFFF8;   // slot at offset 0xFFF8
    end
    #1;
    for (int l = 0; l < LANES; l++) begin
      check(is_stack[l] && !fault[l] && int'(target_tid[l]) == 8 + l, "own stack access");
      check(out_va[l] == out_va[0] + 48'(4 * l), "same slot of consecutive threads in consecutive words");
    end
    check((out_va[0] >> 5) == (out_va[LANES-1] >> 5), "one cache line for the sub-batch");
    // cross-thread access faults unless allowed
    lane_tid[0] = 5'd3;
    #1;
    check(fault[0] && int'(target_tid[0]) == 8, "cross-thread stack access faults");
    xstack_allow = 1;
    #1;
    check(!fault[0], "cross-thread stack access allowed");
    xstack_allow = 0;

    for (int n = 0; n < 2000; n++) begin
      ss0        = {16'h7F00, 32'($urandom)} & ~48'hFFFF_FF;
      stack_log2 = 6'($urandom_range(12, 20));
      batch_size = ($clog2(BATCH+1))'($urandom_range(1, 32));
      lane_valid = LANES'($urandom);
      xstack_allow = 1'($urandom_range(0, 1));
      for (int l = 0; l < LANES; l++) begin
        lane_tid[l] = 5'($urandom_range(0, 31));
        case ($urandom_range(0, 3))
          0: lane_va[l] = ss0 - 48'($urandom_range(1, 4096));              // below
          1: lane_va[l] = ss0 + (48'(batch_size) << stack_log2) + 48'($urandom_range(0, 4096)); // above
          default: lane_va[l] = ss0 + 48'($urandom) % (48'(batch_size) << stack_log2);
        endcase
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        logic [VA_W-1:0] off, o, t, m;
        bit in_st;
        off   = lane_va[l] - ss0;
        in_st = lane_valid[l] && lane_va[l] >= ss0 && off < (48'(batch_size) << stack_log2);
        t     = off >> stack_log2;
        o     = off & ((48'(1) << stack_log2) - 1);
        m     = ss0 + ((o >> 2) * 48'(batch_size) + t) * 4 + (o & 3);
        check(is_stack[l] == in_st, "stack detection");
        if (in_st) begin
          check(out_va[l] == m, "interleaved address");
          check(int'(target_tid[l]) == int'(t), "target thread id");
          check(fault[l] == (!xstack_allow && t != 48'(lane_tid[l])), "permission check");
        end else begin
          check(out_va[l] == lane_va[l] && !fault[l], "non-stack address passes through");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

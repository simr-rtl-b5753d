// tb_subbatch_issue: self-checking test of sub-batch interleaving.
//
// Sends instructions with random and directed 32-thread active masks through
// the 8-lane issue unit, with random back-pressure, and checks that exactly
// the non-empty sub-batches leave, in order, with the right lane masks, tags
// and first/last flags. With out_ready held high it also checks the rate: an
// instruction with s non-empty sub-batches occupies the output for s cycles,
// back to back with the next instruction.
module tb_subbatch_issue;
  localparam int BATCH = 32, LANES = 8, NSB = BATCH / LANES, TAG_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_first, out_last;
  logic [BATCH-1:0] in_mask;
  logic [TAG_W-1:0] in_tag, out_tag;
  logic [LANES-1:0] out_lane_mask;
  logic [$clog2(NSB)-1:0] out_sb;

  subbatch_issue #(.BATCH(BATCH), .LANES(LANES), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // expected stream of sub-batches: {tag, sb, lane mask, first, last}
  typedef struct { logic [TAG_W-1:0] tag; int sb; logic [LANES-1:0] m; bit first, last; } exp_t;
  exp_t q[$];
  bit   bp;          // random back-pressure enabled
  int   sent, got, out_cycles;

  task automatic push_expect(input logic [BATCH-1:0] m, input logic [TAG_W-1:0] t);
    int n, k;
    n = 0;
    for (int s = 0; s < NSB; s++) if (m[s*LANES +: LANES] != '0) n++;
    k = 0;
    for (int s = 0; s < NSB; s++) if (m[s*LANES +: LANES] != '0) begin
      q.push_back('{tag: t, sb: s, m: m[s*LANES +: LANES], first: k == 0, last: k == n - 1});
      k++;
    end
  endtask

  // driver
  logic [BATCH-1:0] masks[$];
  bit fire;
  initial begin
    in_valid = 0; in_mask = '0; in_tag = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (!in_valid && masks.size() > 0) begin
        in_valid = 1; in_mask = masks.pop_front(); in_tag = TAG_W'(sent);
      end
      #1;
      fire = in_valid && in_ready;   // stable until the next rising edge
      @(posedge clk); #1;
      if (fire) begin
        push_expect(in_mask, in_tag);
        sent++;
        in_valid = 0;
      end
    end
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    out_ready <= bp ? 1'($urandom_range(0, 1)) : 1'b1;
    if (out_valid) out_cycles++;
    if (out_valid && out_ready) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected sub-batch"); end
      else begin
        e = q.pop_front();
        if (out_tag != e.tag || int'(out_sb) != e.sb || out_lane_mask != e.m ||
            out_first != e.first || out_last != e.last) begin
          failures++;
          $display("FAIL @%0t: got tag %0d sb %0d m %h f%0d l%0d exp tag %0d sb %0d m %h f%0d l%0d",
                   $time, out_tag, out_sb, out_lane_mask, out_first, out_last,
                   e.tag, e.sb, e.m, e.first, e.last);
        end
      end
      got++;
    end
  end

  initial begin
    bp = 0; out_ready = 1; sent = 0; got = 0; out_cycles = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // rate check: 4 instructions, 4+1+2+3 non-empty sub-batches, no back-pressure
    masks.push_back('1);
    masks.push_back(32'h0000_0100);
    masks.push_back(32'hFF00_00FF);
    masks.push_back(32'h0101_0100);
    wait (sent == 4);
    repeat (12) @(posedge clk);
    check(got == 10, "all non-empty sub-batches delivered");
    check(out_cycles == 10, "one sub-batch per cycle, empty ones skipped");
    // random masks (some sparse) with back-pressure
    bp = 1;
    for (int n = 0; n < 300; n++)
      masks.push_back(($urandom_range(0, 1) ? BATCH'($urandom) : BATCH'($urandom) & BATCH'($urandom) & BATCH'($urandom)) | BATCH'(1 << $urandom_range(0, 31)));
    wait (sent == 304);
    repeat (40) @(posedge clk);
    check(q.size() == 0, "expected queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

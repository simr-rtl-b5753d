// tb_majority_vote: self-checking test of the batch branch majority vote.
//
// Drives random and directed batches of per-thread branch outcomes (active
// mask, direction, target drawn from a small pool so targets repeat) and
// compares direction, most selected target, agreeing-thread mask and counts
// with a reference computed here by plain counting. Checks the one-cycle
// latency from in_valid to out_valid.
module tb_majority_vote;
  localparam int BATCH = 32;
  localparam int PC_W  = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       in_valid;
  logic [BATCH-1:0]           active, taken;
  logic [BATCH-1:0][PC_W-1:0] target;
  logic                       out_valid, maj_taken;
  logic [PC_W-1:0]            maj_target;
  logic [BATCH-1:0]           agree_mask;
  logic [5:0]                 taken_cnt, active_cnt;

  majority_vote #(.BATCH(BATCH), .PC_W(PC_W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference model
  task automatic expect_out(output bit e_dir, output logic [PC_W-1:0] e_tgt,
                            output logic [BATCH-1:0] e_agree,
                            output int e_tk, output int e_act);
    int best, c;
    e_tk = 0; e_act = 0; best = 0; e_tgt = '0;
    for (int i = 0; i < BATCH; i++) begin
      e_act += active[i];
      e_tk  += active[i] & taken[i];
    end
    e_dir = 2 * e_tk > e_act;
    for (int i = 0; i < BATCH; i++) if (active[i] && taken[i]) begin
      c = 0;
      for (int j = 0; j < BATCH; j++)
        if (active[j] && taken[j] && target[j] == target[i]) c++;
      if (c > best) begin best = c; e_tgt = target[i]; end
    end
    for (int i = 0; i < BATCH; i++)
      e_agree[i] = e_dir ? (active[i] && taken[i] && target[i] == e_tgt)
                         : (active[i] && !taken[i]);
    if (!e_dir) e_tgt = '0;
  endtask

  task automatic run_one(input string name);
    bit e_dir; logic [PC_W-1:0] e_tgt; logic [BATCH-1:0] e_agree; int e_tk, e_act;
    expect_out(e_dir, e_tgt, e_agree, e_tk, e_act);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    check(out_valid, {name, ": out_valid one cycle after in_valid"});
    check(maj_taken == e_dir, {name, ": direction"});
    check(maj_target == e_tgt, {name, ": target"});
    check(agree_mask == e_agree, {name, ": agree mask"});
    check(int'(taken_cnt) == e_tk && int'(active_cnt) == e_act, {name, ": counts"});
    @(posedge clk); #1;
    check(!out_valid, {name, ": single-cycle out_valid"});
  endtask

  initial begin
    in_valid = 0; active = '0; taken = '0; target = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // all threads agree on one taken target
    active = '1; taken = '1;
    for (int i = 0; i < BATCH; i++) target[i] = 48'h4000;
    run_one("uniform taken");
    check(maj_taken && agree_mask == '1, "uniform: every thread agrees");

    // 20 of 32 not taken: majority not taken
    taken = 32'h0000_0FFF;
    run_one("mostly not taken");
    // tie 16/16 goes to not taken
    taken = 32'h0000_FFFF;
    run_one("tie");
    // indirect branch: 3 targets, the middle one most popular
    taken = '1;
    for (int i = 0; i < BATCH; i++) target[i] = (i < 5) ? 48'h100 : (i < 25 ? 48'h200 : 48'h300);
    run_one("indirect");
    check(maj_target == 48'h200, "indirect: most selected target");
    // inactive threads do not vote
    active = 32'h0000_000F; taken = 32'hFFFF_FFF0;
    run_one("inactive ignored");

    for (int n = 0; n < 300; n++) begin
      active = $urandom; taken = $urandom;
      for (int i = 0; i < BATCH; i++) target[i] = 48'h1000 + 48'($urandom_range(0, 3)) * 16;
      run_one("random");
    end
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

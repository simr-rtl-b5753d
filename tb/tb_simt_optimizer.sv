// tb_simt_optimizer: self-checking test of the MinSP-PC convergence optimizer.
//
// Directed part: an if/else divergence that is serialised lowest-PC first and
// reconverges, a function call that takes priority through its lower SP,
// thread exit, and the deadlock escape (a spinning path with atomics is
// set aside for T_CYC cycles after K_CYC cycles; without atomics it is not).
// Random part: random per-thread PC/SP updates compared each time against a
// MinSP-PC reference model kept in the testbench. K_CYC/B_ATOM/T_CYC are
// reduced to keep the run short.
module tb_simt_optimizer;
  localparam int BATCH = 32, PC_W = 48, K = 8, BA = 2, T = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       launch_valid, commit_valid, atomic_dec;
  logic [BATCH-1:0]           launch_mask, commit_mask, commit_exit;
  logic [PC_W-1:0]            launch_pc;
  logic [BATCH-1:0][PC_W-1:0] launch_sp, commit_pc, commit_sp;
  logic                       sel_valid, sel_switched;
  logic [PC_W-1:0]            sel_pc, sel_sp;
  logic [BATCH-1:0]           sel_mask;

  simt_optimizer #(.BATCH(BATCH), .PC_W(PC_W), .K_CYC(K), .B_ATOM(BA), .T_CYC(T)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference thread state
  logic [BATCH-1:0]           m_live;
  logic [BATCH-1:0][PC_W-1:0] m_pc, m_sp;

  function automatic logic [BATCH-1:0] ref_mask(input logic [BATCH-1:0] cand);
    logic [PC_W-1:0] msp, mpc; logic [BATCH-1:0] m;
    msp = '1; mpc = '1;
    for (int i = 0; i < BATCH; i++) if (cand[i] && m_sp[i] < msp) msp = m_sp[i];
    for (int i = 0; i < BATCH; i++) if (cand[i] && m_sp[i] == msp && m_pc[i] < mpc) mpc = m_pc[i];
    for (int i = 0; i < BATCH; i++) m[i] = cand[i] && m_sp[i] == msp && m_pc[i] == mpc;
    return m;
  endfunction

  task automatic idle();
    launch_valid = 0; commit_valid = 0; commit_mask = '0; commit_exit = '0;
  endtask

  task automatic launch(input logic [BATCH-1:0] m, input logic [PC_W-1:0] pc,
                        input logic [PC_W-1:0] sp);
    launch_valid = 1; launch_mask = m; launch_pc = pc;
    for (int i = 0; i < BATCH; i++) begin launch_sp[i] = sp; m_sp[i] = sp; m_pc[i] = pc; end
    m_live = m;
    @(posedge clk); #1; idle();
  endtask

  // move the threads of mask m to pc/sp (one commit)
  task automatic move(input logic [BATCH-1:0] m, input logic [PC_W-1:0] pc,
                      input logic [PC_W-1:0] sp, input logic [BATCH-1:0] ex = '0);
    commit_valid = 1; commit_mask = m; commit_exit = ex;
    for (int i = 0; i < BATCH; i++) if (m[i]) begin
      commit_pc[i] = pc; commit_sp[i] = sp; m_pc[i] = pc; m_sp[i] = sp;
    end
    m_live &= ~ex;
    @(posedge clk); #1; idle();
  endtask

  task automatic expect_sel(input logic [PC_W-1:0] pc, input logic [BATCH-1:0] m,
                            input string what);
    @(posedge clk); #1;   // registered selection
    check(sel_valid && sel_pc == pc && sel_mask == m, what);
  endtask

  int switched_cycles, spin_cycles;

  initial begin
    idle(); atomic_dec = 0; launch_mask = '0; launch_pc = '0; launch_sp = '0;
    commit_pc = '0; commit_sp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;

    launch('1, 48'h100, 48'h7000);
    expect_sel(48'h100, '1, "launch: whole batch at entry PC");
    // divergence: lower half takes the branch to 0x120, upper half falls to 0x110
    move(32'h0000_FFFF, 48'h120, 48'h7000);
    move(32'hFFFF_0000, 48'h110, 48'h7000);
    expect_sel(48'h110, 32'hFFFF_0000, "divergence: lowest PC path first");
    move(32'hFFFF_0000, 48'h130, 48'h7000);
    expect_sel(48'h120, 32'h0000_FFFF, "divergence: other path next");
    move(32'h0000_FFFF, 48'h130, 48'h7000);
    expect_sel(48'h130, '1, "reconvergence at the lowest common PC");
    // function call: threads 0-3 deeper (lower SP) go first despite higher PC
    move(32'h0000_000F, 48'h900, 48'h6F00);
    expect_sel(48'h900, 32'h0000_000F, "MinSP: deepest call first");
    check(sel_sp == 48'h6F00, "MinSP: selected SP");
    move(32'h0000_000F, 48'h130, 48'h7000);
    expect_sel(48'h130, '1, "return reconverges");
    // exit of half the batch
    move(32'h0000_00FF, 48'h130, 48'h7000, 32'h0000_00FF);
    expect_sel(48'h130, 32'hFFFF_FF00, "exited threads leave the mask");

    // deadlock escape: lower half spins at 0x200 with atomics, upper waits at 0x300
    launch('1, 48'h200, 48'h7000);
    move(32'hFFFF_0000, 48'h300, 48'h7000);
    @(posedge clk); #1;
    switched_cycles = 0; spin_cycles = 0;
    for (int c = 0; c < 3 * (K + T); c++) begin
      atomic_dec   = 1;
      commit_valid = 1; commit_mask = sel_mask;       // selected path loops on itself
      for (int i = 0; i < BATCH; i++) begin commit_pc[i] = sel_pc; commit_sp[i] = 48'h7000; end
      @(posedge clk); #1;
      if (sel_switched) begin
        switched_cycles++;
        check(sel_pc == 48'h300 && sel_mask == 32'hFFFF_0000, "switched path is the waiting one");
      end else spin_cycles++;
    end
    idle(); atomic_dec = 0;
    check(switched_cycles > 0, "deadlock escape happened");
    check(switched_cycles >= T && switched_cycles <= 3 * T, "switch lasts about T cycles each time");
    // same situation without atomics: no switch
    launch('1, 48'h200, 48'h7000);
    move(32'hFFFF_0000, 48'h300, 48'h7000);
    switched_cycles = 0;
    for (int c = 0; c < 3 * (K + T); c++) begin
      commit_valid = 1; commit_mask = sel_mask;
      for (int i = 0; i < BATCH; i++) begin commit_pc[i] = sel_pc; commit_sp[i] = 48'h7000; end
      @(posedge clk); #1;
      if (sel_switched) switched_cycles++;
    end
    idle();
    check(switched_cycles == 0, "no escape without atomics");

    // random: reference MinSP-PC after each commit
    launch('1, 48'h1000, 48'h7000);
    for (int n = 0; n < 400; n++) begin
      logic [BATCH-1:0] m;
      m = $urandom;
      commit_valid = 1; commit_mask = m; commit_exit = ($urandom_range(0, 9) == 0) ? BATCH'($urandom) & ~m : '0;
      for (int i = 0; i < BATCH; i++) begin
        commit_pc[i] = 48'h1000 + 48'($urandom_range(0, 7)) * 4;
        commit_sp[i] = 48'h7000 - 48'($urandom_range(0, 2)) * 48'h100;
        if (m[i]) begin m_pc[i] = commit_pc[i]; m_sp[i] = commit_sp[i]; end
      end
      m_live &= ~commit_exit;
      @(posedge clk); #1; idle();
      @(posedge clk); #1;
      check(sel_mask == ref_mask(m_live) && sel_valid == (m_live != '0), "random MinSP-PC selection");
      if (m_live == '0) launch('1, 48'h1000, 48'h7000);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

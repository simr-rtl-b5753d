// tb_mcu: self-checking test of the memory coalescing unit.
//
// Feeds sub-batches of 8 lane addresses built to be uniform (one word),
// consecutive words of one line, or random, under random active masks, and
// compares mode, slot mask, slot addresses and access count with a reference
// classifier written here. Checks the one-cycle latency.
module tb_mcu;
  import rpu_pkg::*;
  localparam int L = 8, AW = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid, out_valid;
  logic [L-1:0]         in_mask, out_lane_mask, out_slot_mask;
  logic [L-1:0][AW-1:0] in_addr, out_slot_addr;
  logic [7:0]           in_payload, out_payload;
  mcu_mode_e            out_mode;
  logic [3:0]           out_n_access;

  mcu #(.LANES(L), .VA_W(AW), .LINE_BYTES(32), .WORD_BYTES(4), .PAY_W(8)) dut (.*);

  int checks = 0, failures = 0;
  int n_uni = 0, n_con = 0, n_div = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic run_one();
    mcu_mode_e e; int f, n; bit uni, con; logic [L-1:0] sm;
    f = -1; n = 0;
    for (int l = 0; l < L; l++) if (in_mask[l]) begin n++; if (f < 0) f = l; end
    uni = 1; con = 1;
    for (int l = 0; l < L; l++) if (in_mask[l]) begin
      if (in_addr[l] / 4 != in_addr[f] / 4) uni = 0;
      if (in_addr[l] / 32 != in_addr[f] / 32 || in_addr[l] / 4 != in_addr[f] / 4 + l - f) con = 0;
    end
    e  = (n == 0) ? MCU_NONE : uni ? MCU_UNIFORM : con ? MCU_CONSEC : MCU_DIVERGENT;
    sm = (e == MCU_DIVERGENT) ? in_mask : (n == 0 ? '0 : L'(1));
    in_valid = 1; in_payload = 8'($urandom);
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid, "one-cycle latency");
    check(out_mode == e, $sformatf("mode %s expected %s", out_mode.name(), e.name()));
    check(out_slot_mask == sm, "slot mask");
    check(int'(out_n_access) == (e == MCU_DIVERGENT ? n : (n > 0 ? 1 : 0)), "access count");
    if (e == MCU_UNIFORM || e == MCU_CONSEC) check(out_slot_addr[0] == in_addr[f], "slot 0 address");
    if (e == MCU_DIVERGENT)
      for (int l = 0; l < L; l++) if (in_mask[l]) check(out_slot_addr[l] == in_addr[l], "per-lane slot address");
    check(out_lane_mask == in_mask, "lane mask kept");
    case (e) MCU_UNIFORM: n_uni++; MCU_CONSEC: n_con++; MCU_DIVERGENT: n_div++; default: ; endcase
  endtask

  initial begin
    in_valid = 0; in_mask = '0; in_addr = '0; in_payload = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // directed: the three patterns with a full mask
    in_mask = '1;
    for (int l = 0; l < L; l++) in_addr[l] = 48'h1000_0040;
    run_one();
    check(out_mode == MCU_UNIFORM && out_n_access == 1, "shared word: one access");
    for (int l = 0; l < L; l++) in_addr[l] = 48'h1000_0040 + 48'(4 * l);
    run_one();
    check(out_mode == MCU_CONSEC && out_n_access == 1, "consecutive words: one access");
    for (int l = 0; l < L; l++) in_addr[l] = 48'h1000_0000 + 48'(l * 4096);
    run_one();
    check(out_mode == MCU_DIVERGENT && out_n_access == 8, "scattered: one access per lane");
    for (int n = 0; n < 3000; n++) begin
      logic [AW-1:0] b;
      in_mask = L'($urandom);
      b = {16'h0, 32'($urandom)} & ~48'h1F;
      for (int l = 0; l < L; l++)
        case (n % 4)
          0: in_addr[l] = b + 48'h8;
          1: in_addr[l] = b + 48'(4 * l);
          2: in_addr[l] = b + 48'(4 * l) + ($urandom_range(0, 7) == 0 ? 48'h4 : 48'h0);
          default: in_addr[l] = {16'h0, 32'($urandom)};
        endcase
      run_one();
    end
    check(n_uni > 100 && n_con > 100 && n_div > 100, "all three patterns exercised");
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

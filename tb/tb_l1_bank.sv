// tb_l1_bank: self-checking test of one L1 data bank.
//
// A next-level model answers line reads after a random delay and applies
// write-through stores; requests are random loads and word-masked stores to a
// few sets with more tags than ways (so lines are replaced), with random
// back-pressure on responses and on the next level. Every load answer is
// compared with a reference memory updated in request order (the bank is
// in order and write-through). A directed phase checks the 8-cycle hit
// latency and that a miss costs more.
module tb_l1_bank;
  localparam int HL = 8, PA = 48, IDW = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_we, rsp_valid, rsp_ready;
  logic [PA-1:0] req_addr, mem_req_addr;
  logic [255:0] req_wdata, rsp_data, mem_req_wdata, mem_rsp_data;
  logic [7:0] req_wmask, mem_req_wmask;
  logic [IDW-1:0] req_id, rsp_id;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid, ev_hit, ev_miss;

  l1_bank #(.BANK_BYTES(32768), .WAYS(8), .LINE_BYTES(32), .NBANKS(8), .HIT_LAT(HL),
            .PA_W(PA), .ID_W(IDW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // next-level memory: line contents default to a hash of the address
  logic [255:0] l2[logic [PA-1:0]];
  logic [255:0] refm[logic [PA-1:0]];
  function automatic logic [255:0] init_line(input logic [PA-1:0] a);
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[k*32 +: 32] = 32'(a) ^ (32'h9E37_79B9 * (k + 1));
    return v;
  endfunction
  function automatic logic [255:0] rd(ref logic [255:0] m[logic [PA-1:0]], input logic [PA-1:0] a);
    return m.exists(a) ? m[a] : init_line(a);
  endfunction
  function automatic logic [255:0] merge(input logic [255:0] old, input logic [255:0] d, input logic [7:0] m);
    for (int k = 0; k < 8; k++) if (m[k]) old[k*32 +: 32] = d[k*32 +: 32];
    return old;
  endfunction

  // next-level model
  int           l2_delay;
  bit           l2_busy;
  logic [PA-1:0] l2_addr;
  bit           mem_bp;
  always @(posedge clk) if (rst_n) begin
    mem_rsp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) l2[mem_req_addr] = merge(rd(l2, mem_req_addr), mem_req_wdata, mem_req_wmask);
      else begin l2_busy = 1; l2_addr = mem_req_addr; l2_delay = $urandom_range(2, 10); end
    end else if (l2_busy) begin
      if (l2_delay == 0) begin
        mem_rsp_valid <= 1'b1; mem_rsp_data <= rd(l2, l2_addr); l2_busy = 0;
      end else l2_delay--;
    end
    mem_req_ready <= mem_bp ? 1'($urandom_range(0, 1)) : 1'b1;
  end

  // expected answers
  typedef struct { logic [IDW-1:0] id; logic [255:0] d; int t; } exp_t;
  exp_t q[$];
  int   cyc, lat, hits, misses;
  bit   rsp_bp;
  always @(posedge clk) begin
    cyc++;
    if (ev_hit) hits++;
    if (ev_miss) misses++;
    if (rst_n && rsp_valid && rsp_ready) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected answer"); end
      else begin
        e = q.pop_front();
        lat = cyc - e.t;
        if (rsp_id != e.id || rsp_data != e.d) begin
          failures++; $display("FAIL @%0t: answer id %0d data %h expected id %0d %h", $time, rsp_id, rsp_data, e.id, e.d);
        end
      end
    end
    rsp_ready <= rsp_bp ? 1'($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic send(input bit we, input logic [PA-1:0] a, input logic [255:0] d, input logic [7:0] m,
                      input logic [IDW-1:0] id);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d; req_wmask = m; req_id = id;
    #1;
    while (!req_ready) begin @(posedge clk); #1; end
    // accepted at this edge: update the reference in request order
    if (we) refm[{a[PA-1:5], 5'b0}] = merge(rd(refm, {a[PA-1:5], 5'b0}), d, m);
    else q.push_back('{id: id, d: rd(refm, {a[PA-1:5], 5'b0}), t: cyc + 1});
    @(posedge clk); #1;
    req_valid = 0;
  endtask

  initial begin
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0; req_wmask = '0; req_id = '0;
    mem_bp = 0; rsp_bp = 0; cyc = 0; hits = 0; misses = 0; l2_busy = 0; l2_delay = 0;
    mem_rsp_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    // directed: miss then hit latency
    send(0, 48'h0000_1234_0100, '0, '0, 10'd1);
    wait (q.size() == 0); @(posedge clk); #1;
    check(lat > HL, "a miss takes longer than a hit");
    send(0, 48'h0000_1234_0104, '0, '0, 10'd2);
    wait (q.size() == 0); @(posedge clk); #1;
    check(lat == HL, $sformatf("hit latency %0d cycles", lat));
    // store hits the line and is written through
    send(1, 48'h0000_1234_0100, {8{32'hCAFE_F00D}}, 8'b0000_0100, 10'd3);
    send(0, 48'h0000_1234_0100, '0, '0, 10'd4);
    wait (q.size() == 0);
    // random traffic, back-to-back requests, back-pressure
    mem_bp = 1; rsp_bp = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [PA-1:0] a;
      a = {15'($urandom_range(0, 11)), 18'h0, 7'($urandom_range(0, 3)), 3'b000, 5'($urandom_range(0, 7) * 4)};
      if ($urandom_range(0, 3) == 0)
        send(1, a, {8{32'($urandom)}} ^ {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
             8'($urandom), 10'(n));
      else send(0, a, '0, '0, 10'(n));
    end
    wait (q.size() == 0);
    check(hits > 500 && misses > 100, $sformatf("hits %0d and misses %0d both exercised", hits, misses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

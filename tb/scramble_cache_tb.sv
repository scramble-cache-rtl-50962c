// End-to-end test of the Scramble Cache at its default parameters (32 KiB,
// 8 ways, 64-byte lines, history of 8 seeds, seed change every 8192
// accesses) in front of a behavioural memory with random back-pressure.
//
// The test plays a processor running three processes in disjoint address
// regions. Each process works on a set of hot lines that fits the cache
// and now and then touches far lines that force evictions. Processes switch
// every few thousand accesses (each switch changes the seed) and external
// seed-change requests arrive in between. Every read is compared with a
// shadow copy of memory kept by the test. A directed section checks that
// the history lookup respects process identifiers.
//
// Timing checks: a hit answers 2 cycles after it is accepted, a line found
// through the history answers 5 to 4+R-1 cycles after (no queue stall), a
// memory fill takes more than 4+R-1 cycles. Every mechanism of the design
// (hit, history move, in-place history move, miss, victim write-back,
// sweep write-back, the three seed-change causes, write-back queue stall)
// must happen at least once.
module scramble_cache_tb;
  import scramble_pkg::*;

  localparam int unsigned ADDR_W  = ADDR_W_DEF;
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES_DEF);
  localparam int unsigned LADDR_W = ADDR_W - OFF_W;
  localparam int unsigned LINE_W  = LINE_BYTES_DEF * 8;
  localparam int unsigned R       = HIST_DEPTH_DEF;
  localparam int unsigned N_OPS   = 45000;
  localparam int unsigned HOT     = 320;    // hot lines per process
  localparam longint unsigned WATCHDOG = 4_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [ADDR_W-1:0]  req_addr = '0;
  logic [31:0]        req_wdata = '0;
  logic [3:0]         req_be = '0;
  logic [7:0]         req_pid = '0;
  logic               resp_valid;
  logic [31:0]        resp_rdata;
  logic               rekey_req = 1'b0;
  logic               mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [LADDR_W-1:0] mem_req_addr;
  logic [LINE_W-1:0]  mem_req_wdata, mem_resp_rdata;
  logic [$clog2(R)-1:0] generation;
  cache_events_t      events;
  int unsigned        n_mem_reads, n_mem_writes;

  scramble_cache dut (
    .clk, .rst_n, .rng_seed (32'hC0FF_EE11),
    .req_valid, .req_ready, .req_addr, .req_we, .req_wdata, .req_be, .req_pid,
    .resp_valid, .resp_rdata, .rekey_req,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata,
    .generation, .events
  );

  mem_model #(.LADDR_W(LADDR_W), .LINE_W(LINE_W), .LAT(10), .STALL(1'b1)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
    .req_addr (mem_req_addr), .req_wdata (mem_req_wdata),
    .resp_valid (mem_resp_valid), .resp_rdata (mem_resp_rdata),
    .n_reads (n_mem_reads), .n_writes (n_mem_writes)
  );

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters, sampled mid-cycle.
  int unsigned c_hit, c_hist, c_inpl, c_miss, c_evwb, c_swwb, c_rk, c_rkc, c_rkp, c_rke, c_stall;
  initial begin
    c_hit = 0; c_hist = 0; c_inpl = 0; c_miss = 0; c_evwb = 0; c_swwb = 0;
    c_rk = 0; c_rkc = 0; c_rkp = 0; c_rke = 0; c_stall = 0;
  end
  always @(negedge clk) if (rst_n) begin
    c_hit   += 32'(events.hit);
    c_hist  += 32'(events.hist_hit);
    c_inpl  += 32'(events.hist_inplace);
    c_miss  += 32'(events.miss);
    c_evwb  += 32'(events.evict_wb);
    c_swwb  += 32'(events.sweep_wb);
    c_rk    += 32'(events.rekey);
    c_rkc   += 32'(events.rekey_count);
    c_rkp   += 32'(events.rekey_pid);
    c_rke   += 32'(events.rekey_ext);
    c_stall += 32'(events.wbq_stall);
  end

  // Shadow of memory contents as the processor must see them.
  logic [31:0] shadow [longint unsigned];

  function automatic logic [31:0] expect_word(logic [ADDR_W-1:0] a);
    longint unsigned k = longint'(a >> 2);
    if (shadow.exists(k)) return shadow[k];
    return tb_mem_pkg::init_word(longint'(a >> OFF_W), int'(a[OFF_W-1:2]));
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures <= 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  int unsigned stall_mark = 0;
  always @(negedge clk) if (req_valid && req_ready) stall_mark = c_stall;

  // Last access outcome, for the directed checks.
  logic last_hit, last_hist, last_miss;
  int unsigned last_lat;

  task automatic access(logic [ADDR_W-1:0] a, logic we, logic [31:0] d, logic [3:0] be, logic [7:0] pid);
    longint unsigned t0;
    logic [31:0] exp_w;
    a[1:0] = 2'b00;
    @(negedge clk);
    req_valid = 1'b1; req_addr = a; req_we = we; req_wdata = d; req_be = be; req_pid = pid;
    #1;  // let the ready output follow the new request
    while (!req_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    last_lat  = int'(cyc - t0);
    last_hit  = events.hit;
    last_hist = events.hist_hit;
    last_miss = events.miss;
    exp_w = expect_word(a);
    if (we) begin
      for (int b = 0; b < 4; b++) if (be[b]) exp_w[b*8 +: 8] = d[b*8 +: 8];
      shadow[longint'(a >> 2)] = exp_w;
    end
    checks++;
    if (resp_rdata !== exp_w)
      fail($sformatf("addr %h we %0d data %h expected %h", a, we, resp_rdata, exp_w));
    checks++;
    if (32'(last_hit) + 32'(last_hist) + 32'(last_miss) != 1)
      fail($sformatf("addr %h: response with no single outcome", a));
    if (last_hit) begin
      checks++;
      if (last_lat != 2) fail($sformatf("hit latency %0d, expected 2", last_lat));
    end
    if (last_hist && !events.wbq_stall && c_stall == stall_mark) begin
      checks++;
      if (last_lat < 5 || last_lat > 4 + R - 1)
        fail($sformatf("history latency %0d outside 5..%0d", last_lat, 4 + R - 1));
    end
    if (last_miss) begin
      checks++;
      if (last_lat <= 4 + R - 1) fail($sformatf("miss latency %0d too short", last_lat));
    end
  endtask

  function automatic logic [ADDR_W-1:0] hot_addr(logic [7:0] pid, int unsigned line, int unsigned word);
    return (ADDR_W'(pid) << 22) | (ADDR_W'(line) << OFF_W) | (ADDR_W'(word) << 2);
  endfunction

  initial begin : watchdog
    wait (cyc == WATCHDOG);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pid;
    logic [ADDR_W-1:0] a;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Directed: history lookup is limited to the owner of a generation.
    begin : pid_isolation
      logic [ADDR_W-1:0] x;
      x = hot_addr(8'd9, 5, 3);
      access(x, 1'b0, '0, 4'h0, 8'd9);            // miss, fill for pid 9
      checks++; if (!last_miss) fail("isolation: first access should miss");
      access(x, 1'b0, '0, 4'h0, 8'd9);
      checks++; if (!last_hit) fail("isolation: second access should hit");
      access(x, 1'b0, '0, 4'h0, 8'd10);           // new process: seed changes
      checks++; if (!last_miss) fail("isolation: other process must not use the old copy");
      access(x, 1'b0, '0, 4'h0, 8'd9);            // back to pid 9: its old copy is found
      checks++; if (!last_hist) fail("isolation: owner should find its old copy");
    end

    // Directed: many dirty lines of one generation, then R seed changes
    // with no traffic. The sweep that reuses that generation must write
    // them all back, faster than memory accepts them, and the data must
    // come back from memory afterwards.
    begin : sweep_burst
      for (int unsigned l = 0; l < 300; l++)
        access(hot_addr(8'd20, l, l % 16), 1'b1, $urandom, 4'hF, 8'd20);
      for (int unsigned k = 0; k < R; k++) begin
        @(negedge clk); rekey_req = 1'b1; @(negedge clk); rekey_req = 1'b0;
        repeat (600) @(negedge clk);
      end
      for (int unsigned l = 0; l < 300; l++) begin
        access(hot_addr(8'd20, l, l % 16), 1'b0, '0, 4'h0, 8'd20);
        checks++; if (!last_miss) fail("sweep: written-back line should come from memory");
      end
    end

    // Random traffic.
    pid = 8'd1;
    for (int unsigned i = 0; i < N_OPS; i++) begin
      int unsigned sel;
      if (i % 3100 == 3099) pid = 8'(1 + (pid % 3));
      if (i % 1700 == 850) begin
        @(negedge clk); rekey_req = 1'b1; @(negedge clk); rekey_req = 1'b0;
      end
      sel = $urandom_range(0, 99);
      if (sel < 92) a = hot_addr(pid, $urandom_range(0, HOT - 1), $urandom_range(0, 15));
      else          a = hot_addr(pid, 4096 + $urandom_range(0, 20000), $urandom_range(0, 15));
      if ($urandom_range(0, 99) < 35)
        access(a, 1'b1, $urandom, 4'($urandom_range(1, 15)), pid);
      else
        access(a, 1'b0, $urandom, 4'($urandom), pid);  // read: data and byte enables ignored
    end

    // Read back every hot line word that was written: data survives
    // seed changes, moves and write-backs.
    foreach (shadow[k]) access(ADDR_W'(k << 2), 1'b0, '0, 4'h0, 8'(k >> 20));

    $display("hits=%0d history_moves=%0d in_place=%0d misses=%0d victim_wb=%0d sweep_wb=%0d",
             c_hit, c_hist, c_inpl, c_miss, c_evwb, c_swwb);
    $display("rekeys=%0d (interval=%0d process=%0d external=%0d) wbq_stalls=%0d mem_reads=%0d mem_writes=%0d cycles=%0d",
             c_rk, c_rkc, c_rkp, c_rke, c_stall, n_mem_reads, n_mem_writes, cyc);
    checks++; if (c_hit   == 0) fail("no hit");
    checks++; if (c_hist  == 0) fail("no history move");
    checks++; if (c_inpl  == 0) fail("no in-place history move");
    checks++; if (c_miss  == 0) fail("no miss");
    checks++; if (c_evwb  == 0) fail("no victim write-back");
    checks++; if (c_swwb  == 0) fail("no sweep write-back");
    checks++; if (c_rkc   == 0) fail("no interval seed change");
    checks++; if (c_rkp   == 0) fail("no process seed change");
    checks++; if (c_rke   == 0) fail("no external seed change");
    checks++; if (c_stall == 0) fail("no write-back queue stall");
    checks++; if (c_rk > c_rkc + c_rkp + c_rke) fail("seed change cause count mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

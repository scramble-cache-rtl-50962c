// Test of the cycle-count seed-change trigger (REFRESH_CYCLES), which the
// default configuration leaves off in favour of the access count. A small
// cache (8 sets, 8 ways, history of 4) is built with the access trigger
// effectively disabled and a seed change due every 600 clock cycles. The
// test first runs random loads and stores from one process with random idle
// gaps, then leaves the cache idle, and finally reads back every word it
// wrote. It checks:
//   * every read returns the value of a shadow memory;
//   * only the cycle trigger fires (no access, external or process trigger);
//   * consecutive cycle-triggered seed changes lie 600 cycles apart, give or
//     take the time to finish a request in flight and to sweep (busy
//     phase), and within a few sweep lengths of 600 when idle;
//   * the number of seed changes matches the elapsed time, and the
//     generation output advanced by that number modulo R, idle or not.
module scramble_cache_cycles_tb;
  import scramble_pkg::*;

  localparam int unsigned S       = 3;
  localparam int unsigned R       = 4;
  localparam int unsigned PERIOD  = 600;
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES_DEF);
  localparam int unsigned LADDR_W = ADDR_W_DEF - OFF_W;
  localparam int unsigned LINE_W  = LINE_BYTES_DEF * 8;
  localparam int unsigned N_OPS   = 1500;
  localparam int unsigned IDLE    = 6 * PERIOD;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               req_valid, req_ready, req_we, resp_valid;
  logic [31:0]        req_addr, req_wdata, resp_rdata;
  logic [3:0]         req_be;
  logic               mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [LADDR_W-1:0] mem_req_addr;
  logic [LINE_W-1:0]  mem_req_wdata, mem_resp_rdata;
  logic [$clog2(R)-1:0] generation;
  cache_events_t      events;
  int unsigned        n_mem_reads, n_mem_writes;

  scramble_cache #(.S(S), .R(R), .REFRESH(32'h4000_0000), .REFRESH_CYCLES(PERIOD)) dut (
    .clk, .rst_n, .rng_seed (32'hC0FF_EE11),
    .req_valid, .req_ready, .req_addr, .req_we, .req_wdata, .req_be, .req_pid (8'd0),
    .resp_valid, .resp_rdata, .rekey_req (1'b0),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata, .generation, .events
  );

  mem_model #(.LADDR_W(LADDR_W), .LINE_W(LINE_W), .LAT(20), .STALL(1'b1)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
    .req_addr (mem_req_addr), .req_wdata (mem_req_wdata),
    .resp_valid (mem_resp_valid), .resp_rdata (mem_resp_rdata),
    .n_reads (n_mem_reads), .n_writes (n_mem_writes)
  );

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Event monitor: cycle stamps of the cycle-triggered seed changes.
  longint unsigned cyc = 0;
  longint unsigned rk_at [$];
  int unsigned     n_other = 0, n_hist = 0, n_sweep_wb = 0;
  bit              idle_phase = 1'b0;
  longint unsigned idle_from = 0;

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    if (events.rekey) begin
      check(events.rekey_cycle, "seed change without the cycle trigger");
      rk_at.push_back(cyc);
    end
    if (events.rekey_count || events.rekey_ext || events.rekey_pid) n_other++;
    n_hist     += 32'(events.hist_hit);
    n_sweep_wb += 32'(events.sweep_wb);
  end

  logic [31:0] shadow [longint unsigned];

  function automatic logic [31:0] expect_word(logic [31:0] a);
    if (shadow.exists(longint'(a >> 2))) return shadow[longint'(a >> 2)];
    return tb_mem_pkg::init_word(longint'(a >> OFF_W), int'(a[OFF_W-1:2]));
  endfunction

  task automatic access(input logic [31:0] a, input logic we, input logic [31:0] d);
    logic [31:0] exp_w;
    @(negedge clk);
    req_valid = 1'b1; req_addr = a; req_we = we; req_wdata = d; req_be = 4'hF;
    #1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    exp_w = expect_word(a);
    if (we) begin exp_w = d; shadow[longint'(a >> 2)] = d; end
    check(resp_rdata === exp_w,
          $sformatf("addr %h read %h expected %h", a, resp_rdata, exp_w));
  endtask

  initial begin
    logic [$clog2(R)-1:0] gen0, gen_idle0;
    int unsigned n_busy, n_idle;
    req_valid = 1'b0; req_addr = '0; req_we = 1'b0; req_wdata = '0; req_be = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    gen0 = generation;

    // Busy phase: 96 lines (more than the 64 the cache holds), random gaps.
    for (int unsigned i = 0; i < N_OPS; i++) begin
      logic [31:0] a;
      a = 32'h0040_0000 | (($urandom % 96) << OFF_W) | (($urandom % 16) << 2);
      access(a, ($urandom % 10) < 4, $urandom);
      if ($urandom % 8 == 0) repeat ($urandom % 40) @(negedge clk);
    end
    n_busy = rk_at.size();

    // Idle phase: no requests; seed changes must go on.
    idle_phase = 1'b1;
    idle_from  = cyc;
    gen_idle0  = generation;
    repeat (IDLE) @(negedge clk);
    n_idle = rk_at.size() - n_busy;
    check(rk_at.size() - n_busy >= IDLE / PERIOD - 1 && rk_at.size() - n_busy <= IDLE / PERIOD + 1,
          $sformatf("%0d seed changes in %0d idle cycles", rk_at.size() - n_busy, IDLE));
    check(generation == $clog2(R)'(gen_idle0 + (rk_at.size() - n_busy)),
          "generation did not advance with the idle seed changes");

    // Spacing of consecutive seed changes.
    for (int unsigned i = 1; i < rk_at.size(); i++) begin
      longint d;
      d = longint'(rk_at[i]) - longint'(rk_at[i-1]);
      if (rk_at[i-1] > idle_from + 200)
        check(d >= PERIOD - 30 && d <= PERIOD + 30,
              $sformatf("idle seed changes %0d cycles apart", d));
      else
        check(d >= PERIOD - 150 && d <= PERIOD + 150,
              $sformatf("busy seed changes %0d cycles apart", d));
    end
    check(rk_at.size() >= cyc / PERIOD - 1 && rk_at.size() <= cyc / PERIOD,
          $sformatf("%0d seed changes in %0d cycles", rk_at.size(), cyc));
    check(n_other == 0, "another seed-change trigger fired");

    // Read back every word written; it survived all the seed changes.
    foreach (shadow[k]) access(32'(k << 2), 1'b0, '0);
    check(generation == $clog2(R)'(gen0 + rk_at.size()), "generation count");

    $display("cycle trigger: %0d seed changes in %0d cycles (%0d while idle), %0d history moves, %0d sweep write-backs",
             rk_at.size(), cyc, n_idle, n_hist, n_sweep_wb);
    check(n_hist > 0, "no history move happened");
    check(n_sweep_wb > 0, "no sweep write-back happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

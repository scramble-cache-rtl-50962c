// One Scramble Cache with its memory model and a synthetic single-process
// load/store stream, for configuration sweeps. The stream comes from a
// linear congruential generator seeded by TRACE_SEED, so every
// configuration sees the same addresses: 70 % of accesses go to 64 hot
// lines, 25 % to 1024 warm lines, 5 % to a stream of new lines; 30 % are
// stores. Every read is checked against a shadow memory. When the stream
// has been issued the environment waits for the cache to go idle and
// raises done with its counts. REFRESH = 0 disables seed changes, which
// turns the cache into a conventional one with a fixed mapping (the
// reference point for hit-rate comparisons).
module cache_env #(
  parameter int unsigned S          = 6,
  parameter int unsigned R          = 8,
  parameter int unsigned REFRESH    = 8192,
  parameter int unsigned N_OPS      = 40000,
  parameter int unsigned TRACE_SEED = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_hit,
  output int unsigned n_hist,
  output int unsigned n_miss,
  output int unsigned n_rekey,
  output longint unsigned cycles
);
  import scramble_pkg::*;

  localparam int unsigned OFF_W   = $clog2(LINE_BYTES_DEF);
  localparam int unsigned LADDR_W = ADDR_W_DEF - OFF_W;
  localparam int unsigned LINE_W  = LINE_BYTES_DEF * 8;
  localparam bit          FIXED   = (REFRESH == 0);
  localparam int unsigned REF_EFF = FIXED ? 32'h7FFF_FFFF : REFRESH;

  logic               req_valid, req_ready, req_we, resp_valid;
  logic [31:0]        req_addr, req_wdata, resp_rdata;
  logic [3:0]         req_be;
  logic               mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [LADDR_W-1:0] mem_req_addr;
  logic [LINE_W-1:0]  mem_req_wdata, mem_resp_rdata;
  logic [$clog2(R)-1:0] generation;
  cache_events_t      events;
  int unsigned        n_mem_reads, n_mem_writes;

  scramble_cache #(.S(S), .R(R), .REFRESH(REF_EFF), .REKEY_ON_PID(!FIXED)) dut (
    .clk, .rst_n, .rng_seed (32'h1357_9BDF ^ TRACE_SEED),
    .req_valid, .req_ready, .req_addr, .req_we, .req_wdata, .req_be, .req_pid (8'd0),
    .resp_valid, .resp_rdata, .rekey_req (1'b0),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata, .generation, .events
  );

  mem_model #(.LADDR_W(LADDR_W), .LINE_W(LINE_W), .LAT(20), .STALL(1'b0)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
    .req_addr (mem_req_addr), .req_wdata (mem_req_wdata),
    .resp_valid (mem_resp_valid), .resp_rdata (mem_resp_rdata),
    .n_reads (n_mem_reads), .n_writes (n_mem_writes)
  );

  always @(posedge clk) if (rst_n && !done) cycles <= cycles + 1;
  always @(negedge clk) if (rst_n) begin
    n_hit   += 32'(events.hit);
    n_hist  += 32'(events.hist_hit);
    n_miss  += 32'(events.miss);
    n_rekey += 32'(events.rekey);
  end

  logic [31:0] shadow [longint unsigned];
  logic [31:0] lcg;

  function automatic logic [31:0] rnd();
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return lcg;
  endfunction

  initial begin
    int unsigned streamed;
    done = 1'b0; checks = 0; failures = 0; cycles = 0;
    n_hit = 0; n_hist = 0; n_miss = 0; n_rekey = 0;
    req_valid = 1'b0; req_addr = '0; req_we = 1'b0; req_wdata = '0; req_be = '0;
    lcg = TRACE_SEED;
    streamed = 0;
    wait (rst_n);
    for (int unsigned i = 0; i < N_OPS; i++) begin
      logic [31:0] r, a, exp_w, d;
      logic        we;
      int unsigned line;
      r = rnd();
      if (r[31:24] < 8'd179)      line = (rnd() >> 8) % 64;
      else if (r[31:24] < 8'd243) line = 64 + (rnd() >> 8) % 1024;
      else begin line = 4096 + streamed; streamed++; end
      a  = 32'h0100_0000 | (line << OFF_W) | (((rnd() >> 8) % 16) << 2);
      we = ((rnd() >> 8) % 10) < 3;
      d  = rnd();
      @(negedge clk);
      req_valid = 1'b1; req_addr = a; req_we = we; req_wdata = d; req_be = 4'hF;
      #1;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 1'b0;
      while (!resp_valid) @(negedge clk);
      if (shadow.exists(longint'(a >> 2))) exp_w = shadow[longint'(a >> 2)];
      else exp_w = tb_mem_pkg::init_word(longint'(a >> OFF_W), int'(a[OFF_W-1:2]));
      if (we) begin exp_w = d; shadow[longint'(a >> 2)] = d; end
      checks++;
      if (resp_rdata !== exp_w) begin
        failures++;
        if (failures < 5) $display("FAIL S=%0d R=%0d REFRESH=%0d addr %h got %h expected %h",
                                   S, R, REFRESH, a, resp_rdata, exp_w);
      end
    end
    repeat (200) @(negedge clk);   // let a pending seed change finish
    done = 1'b1;
  end

endmodule

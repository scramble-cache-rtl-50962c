// PRIME+PROBE experiment on the default 32 KiB Scramble Cache, next to the
// same cache with a fixed mapping (no seed change), both in front of a
// 20-cycle memory.
//
// Each round: the attacker PRIMEs every set by reading 8 lines whose set
// bits select it (512 lines, the whole cache); the victim, in the same
// process, reads two fixed addresses whose set bits are VSET0 and VSET1;
// the attacker then PROBEs the same 512 lines and sums the access times
// of each set. The victim's sets are "exposed" in a round when they are
// exactly the two slowest sets.
//
// Checks: every read returns the right data; with the fixed mapping the
// victim's sets are exposed in every round after the first; in the
// Scramble Cache a seed change happens every 8192 accesses, and every set
// probed after a seed change that followed its PRIME is slower than
// all-hit (its 8 lines must be moved or refetched). The per-set means and the
// share of exposed rounds are printed for both caches.
module scramble_cache_primeprobe_tb;
  import scramble_pkg::*;

  localparam int unsigned ROUNDS  = 1000;
  localparam int unsigned SETS    = 1 << SET_BITS_DEF;
  localparam int unsigned WAYS    = WAYS_DEF;
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES_DEF);
  localparam int unsigned LADDR_W = ADDR_W_DEF - OFF_W;
  localparam int unsigned LINE_W  = LINE_BYTES_DEF * 8;
  localparam int unsigned VSET0   = 10, VSET1 = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  // per configuration results: [0] fixed mapping, [1] Scramble Cache
  longint unsigned sum_t  [2][SETS];
  int unsigned     exposed[2];
  int unsigned     rekeyed_rounds[2];
  int unsigned     data_fail[2], data_chk[2];
  int unsigned     hidden_fail;
  logic            done   [2];

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    logic               req_valid, req_ready, resp_valid;
    logic [31:0]        req_addr, resp_rdata;
    logic               mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
    logic [LADDR_W-1:0] mem_req_addr;
    logic [LINE_W-1:0]  mem_req_wdata, mem_resp_rdata;
    logic [2:0]         generation;
    cache_events_t      events;
    int unsigned        n_r, n_w;
    longint unsigned    cyc;
    int unsigned        n_rekey;

    scramble_cache #(.REFRESH(c == 0 ? 32'h7FFF_FFFF : REFRESH_DEF), .REKEY_ON_PID(c == 1)) dut (
      .clk, .rst_n, .rng_seed (32'hA5A5_0F0F + c),
      .req_valid, .req_ready, .req_addr, .req_we (1'b0), .req_wdata ('0), .req_be ('0),
      .req_pid (8'd1), .resp_valid, .resp_rdata, .rekey_req (1'b0),
      .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
      .mem_resp_valid, .mem_resp_rdata, .generation, .events
    );

    mem_model #(.LADDR_W(LADDR_W), .LINE_W(LINE_W), .LAT(20), .STALL(1'b0)) u_mem (
      .clk, .rst_n,
      .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_we (mem_req_we),
      .req_addr (mem_req_addr), .req_wdata (mem_req_wdata),
      .resp_valid (mem_resp_valid), .resp_rdata (mem_resp_rdata),
      .n_reads (n_r), .n_writes (n_w)
    );

    always @(posedge clk) cyc <= cyc + 1;
    always @(negedge clk) if (rst_n) n_rekey += 32'(events.rekey);

    // one read, returns its latency
    task automatic rd(logic [31:0] a, output int unsigned lat);
      longint unsigned t0;
      @(negedge clk);
      req_valid = 1'b1; req_addr = a;
      #1;
      while (!req_ready) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      req_valid = 1'b0;
      while (!resp_valid) @(negedge clk);
      lat = int'(cyc - t0);
      data_chk[c]++;
      if (resp_rdata !== tb_mem_pkg::init_word(longint'(a >> OFF_W), int'(a[OFF_W-1:2])))
        data_fail[c]++;
    endtask

    function automatic logic [31:0] attacker(int unsigned s, int unsigned w);
      return 32'h0200_0000 | ((w * SETS + s) << OFF_W);
    endfunction

    initial begin
      int unsigned lat, t[SETS], rk0;
      bit after[SETS];
      cyc = 0; n_rekey = 0; req_valid = 1'b0; req_addr = '0;
      exposed[c] = 0; rekeyed_rounds[c] = 0; data_fail[c] = 0; data_chk[c] = 0;
      if (c == 1) hidden_fail = 0;
      for (int s = 0; s < SETS; s++) sum_t[c][s] = 0;
      done[c] = 1'b0;
      wait (rst_n);
      for (int unsigned r = 0; r < ROUNDS; r++) begin
        int unsigned m0, m1;
        // PRIME
        for (int unsigned s = 0; s < SETS; s++)
          for (int unsigned w = 0; w < WAYS; w++) rd(attacker(s, w), lat);
        rk0 = n_rekey;
        // victim
        rd(32'h0300_0000 | (VSET0 << OFF_W) | 32'h8, lat);
        rd(32'h0300_0000 | (VSET1 << OFF_W) | 32'h4, lat);
        // PROBE
        for (int unsigned s = 0; s < SETS; s++) begin
          after[s] = (n_rekey != rk0);
          t[s] = 0;
          for (int unsigned w = 0; w < WAYS; w++) begin rd(attacker(s, w), lat); t[s] += lat; end
          sum_t[c][s] += t[s];
        end
        // two slowest sets
        m0 = 0; m1 = 1;
        if (t[1] > t[0]) begin m0 = 1; m1 = 0; end
        for (int unsigned s = 2; s < SETS; s++) begin
          if (t[s] > t[m0]) begin m1 = m0; m0 = s; end
          else if (t[s] > t[m1]) m1 = s;
        end
        if ((m0 == VSET0 && m1 == VSET1) || (m0 == VSET1 && m1 == VSET0)) begin
          if (t[m1] > 2 * WAYS) exposed[c]++;
        end else if (c == 0 && r > 0) begin
          failures++;
          $display("FAIL fixed mapping round %0d: slowest sets %0d, %0d", r, m0, m1);
        end
        if (c == 0 && r > 0) checks++;
        if (n_rekey != rk0) begin
          rekeyed_rounds[c]++;
          for (int unsigned s = 0; s < SETS; s++) begin
            if (after[s]) checks++;
            if (after[s] && t[s] <= 2 * WAYS) begin
              hidden_fail++;
              $display("FAIL round %0d: set %0d probed as all-hit across a seed change", r, s);
            end
          end
        end
      end
      done[c] = 1'b1;
    end
  end

  initial begin : watchdog
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    for (int c = 0; c < 2; c++) begin
      string line;
      line = "";
      for (int s = 0; s < SETS; s++) line = {line, $sformatf(" %0d", sum_t[c][s] / ROUNDS)};
      $display("%s: mean probe cycles per set:%s", c == 0 ? "fixed mapping " : "Scramble Cache", line);
      $display("%s: victim sets %0d and %0d were the two slowest in %0d of %0d rounds; rounds with a seed change between PRIME and PROBE: %0d",
               c == 0 ? "fixed mapping " : "Scramble Cache", VSET0, VSET1, exposed[c], ROUNDS, rekeyed_rounds[c]);
      checks += data_chk[c];
      failures += data_fail[c];
    end
    failures += hidden_fail;
    checks++;
    if (rekeyed_rounds[1] == 0) begin failures++; $display("FAIL no seed change fell inside a round"); end
    checks++;
    if (rekeyed_rounds[0] != 0) begin failures++; $display("FAIL fixed mapping changed its seed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

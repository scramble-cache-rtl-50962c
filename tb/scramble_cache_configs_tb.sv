// Configuration sweep of the Scramble Cache on one synthetic load/store
// stream (see cache_env): cache sizes of 4, 8, 16 and 32 KiB (S = 3..6,
// 8 ways, 64-byte lines), history depths R = 2, 4, 8, 16 and seed-change
// intervals of 512, 2048, 8192 and 32768 accesses, each next to a
// conventional cache of the same size with a fixed mapping. It checks the
// data of every read in every configuration and that each cache changed
// its seed exactly once per interval of accesses, and prints the hit rate
// (plain hits plus history hits) and its change against the fixed mapping.
module scramble_cache_configs_tb;

  localparam int unsigned N_OPS = 30000;
  localparam int unsigned NCFG  = 14;
  // S, R, REFRESH (0 = fixed mapping)
  localparam int unsigned CFG_S   [NCFG] = '{3, 3, 4, 4, 5, 5, 6, 6, 6, 6, 6, 6, 6, 6};
  localparam int unsigned CFG_R   [NCFG] = '{8, 8, 8, 8, 8, 8, 8, 8, 2, 4, 16, 8, 8, 8};
  localparam int unsigned CFG_REF [NCFG] = '{0, 8192, 0, 8192, 0, 8192, 0, 8192,
                                             8192, 8192, 8192, 512, 2048, 32768};
  localparam int unsigned CFG_BASE[NCFG] = '{0, 0, 2, 2, 4, 4, 6, 6, 6, 6, 6, 6, 6, 6};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            done    [NCFG];
  int unsigned     checks_i[NCFG], fail_i[NCFG], hit_i[NCFG], hist_i[NCFG], miss_i[NCFG], rekey_i[NCFG];
  longint unsigned cyc_i   [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    cache_env #(.S(CFG_S[c]), .R(CFG_R[c]), .REFRESH(CFG_REF[c]), .N_OPS(N_OPS), .TRACE_SEED(7)) u_env (
      .clk, .rst_n, .done (done[c]), .checks (checks_i[c]), .failures (fail_i[c]),
      .n_hit (hit_i[c]), .n_hist (hist_i[c]), .n_miss (miss_i[c]), .n_rekey (rekey_i[c]),
      .cycles (cyc_i[c])
    );
  end

  int unsigned checks = 0, failures = 0;

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int c = 0; c < NCFG; c++) if (!done[c]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(negedge clk);
    for (int c = 0; c < NCFG; c++) begin
      real hr, base_hr;
      int unsigned exp_rekeys;
      hr      = 100.0 * real'(hit_i[c] + hist_i[c]) / real'(N_OPS);
      base_hr = 100.0 * real'(hit_i[CFG_BASE[c]] + hist_i[CFG_BASE[c]]) / real'(N_OPS);
      $display("%2d KiB R=%2d interval=%5s: hits=%0d history=%0d misses=%0d seed changes=%0d cycles=%0d hit rate %6.2f %% (%6.2f vs fixed mapping)",
               (1 << CFG_S[c]) * 8 * 64 / 1024, CFG_R[c],
               CFG_REF[c] == 0 ? "fixed" : $sformatf("%0d", CFG_REF[c]),
               hit_i[c], hist_i[c], miss_i[c], rekey_i[c], cyc_i[c], hr, hr - base_hr);
      checks += checks_i[c];
      failures += fail_i[c];
      checks++;
      if (hit_i[c] + hist_i[c] + miss_i[c] != N_OPS) begin
        failures++; $display("FAIL config %0d: outcomes do not add up", c);
      end
      exp_rekeys = (CFG_REF[c] == 0) ? 0 : N_OPS / CFG_REF[c];
      checks++;
      if (rekey_i[c] != exp_rekeys) begin
        failures++; $display("FAIL config %0d: %0d seed changes, expected %0d", c, rekey_i[c], exp_rekeys);
      end
      if (CFG_REF[c] == 0) begin
        checks++;
        if (hist_i[c] != 0) begin failures++; $display("FAIL config %0d: history hit without seed change", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
